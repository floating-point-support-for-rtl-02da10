// tb_wl_complex_mult: floating-point and integer complex multiplication, two
// of the benchmark kernels of the FloRA evaluation, run on the whole RCM at its
// default size through the host port.
//
// (a + bi)(c + di) = (ac - bd) + (ad + bc)i for 16 independent products,
// eight loop iterations per row pair (one per column, loop pipelining):
//   pairs 0 and 2 compute the real part: FMUL a*c into register 0, FMUL b*d,
//   FSUB; pairs 1 and 3 the imaginary part with FMUL a*d, FMUL b*c, FADD.
// Each row pair reads its own data-memory lane, so the host lays the operands
// out per lane: entry i holds the first two factors of iteration i, entry
// 8+i the other two; results go to entry 16+i of the output bank. The second
// bus read of a row is placed 8 contexts after the first, so that the eight
// columns never use a row bus in the same cycle. Results are compared with a
// real-arithmetic reference (3 ulp of the 15-bit fraction); the kernel's
// cycle count from start to done is printed.
// The integer version of the same kernel (16-bit, results modulo 2^16) then
// runs with MUL on the rows' shared multipliers, 32 products at once since in
// integer mode every row works on its own half of a lane word.
module tb_wl_complex_mult;
  import flora_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_en, h_we, irq_done;
  logic [15:0] h_addr;
  logic [31:0] h_wdata, h_rdata;
  int checks = 0, failures = 0;

  flora_rcm dut (.clk, .rst_n, .h_en, .h_we, .h_addr, .h_wdata, .h_rdata, .irq_done);

  task automatic hw(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); h_en = 1; h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk); h_en = 0; h_we = 0;
  endtask
  task automatic hr(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); h_en = 1; h_we = 0; h_addr = a; #1; d = h_rdata;
    @(negedge clk); h_en = 0;
  endtask
  function automatic logic [15:0] dm(int bank, int entry, int lane);
    return 16'h2000 | 16'(bank << 8) | 16'(entry << 2) | 16'(lane);
  endfunction
  function automatic ctx_t cx(op_e op, src_e sa, src_e sb, int addr, logic st);
    ctx_t c = '0;
    c.op = op; c.sa = sa; c.sb = sb; c.addr = 6'(addr); c.st = st;
    return c;
  endfunction
  function automatic real pow2(int k);
    real v = 1.0;
    for (int i = 0; i < (k < 0 ? -k : k); i++) v = (k < 0) ? v / 2.0 : v * 2.0;
    return v;
  endfunction
  function automatic real f2r(logic [31:0] w);
    real v;
    if (w[30:23] == 0) return 0.0;
    v = (1.0 + real'(w[22:0]) / 8388608.0) * pow2(int'(w[30:23]) - 127);
    return w[31] ? -v : v;
  endfunction
  task automatic ck(input logic c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  logic [31:0] va [2][8], vb [2][8], vc [2][8], vd [2][8];
  logic [31:0] ia [2][8], ib [2][8], ic [2][8], id [2][8];

  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    int cyc;
    h_en = 0; h_we = 0; h_addr = 0; h_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // contexts: entries 0..18 of every row
    for (int e = 0; e <= 18; e++)
      for (int r = 0; r < 8; r++) begin
        ctx_t c;
        int pr;
        pr = r / 2;
        c = '0;
        case (e)
          0:  begin c = cx(OP_FMUL, SRC_BUS0, SRC_BUS1, 0, 0); c.rf_we = 1'b1; end
          8:  c = cx(OP_FMUL, SRC_BUS0, SRC_BUS1, 8, 0);
          12: c = cx(pr % 2 == 0 ? OP_FSUB : OP_FADD, SRC_RF, SRC_SELF, 0, 0);
          18: c = cx(OP_NOP, SRC_ZERO, SRC_ZERO, 16, 1);
          default: c = '0;
        endcase
        hw(16'(e * 8 + r), 32'(c));
      end
    hw(16'h1000, {1'b1, 7'd18, 8'd0});

    // operands: set g (0, 1) uses row pairs 2g (real) and 2g+1 (imaginary)
    for (int g = 0; g < 2; g++)
      for (int i = 0; i < 8; i++) begin
        va[g][i] = {1'($urandom), 8'(120 + $urandom % 10), 15'($urandom), 8'h00};
        vb[g][i] = {1'($urandom), 8'(120 + $urandom % 10), 15'($urandom), 8'h00};
        vc[g][i] = {1'($urandom), 8'(120 + $urandom % 10), 15'($urandom), 8'h00};
        vd[g][i] = {1'($urandom), 8'(120 + $urandom % 10), 15'($urandom), 8'h00};
        // real-part lane: (a, c) then (b, d); imaginary lane: (a, d) then (b, c)
        hw(dm(0, i, 2*g), va[g][i]);     hw(dm(1, i, 2*g), vc[g][i]);
        hw(dm(0, 8+i, 2*g), vb[g][i]);   hw(dm(1, 8+i, 2*g), vd[g][i]);
        hw(dm(0, i, 2*g+1), va[g][i]);   hw(dm(1, i, 2*g+1), vd[g][i]);
        hw(dm(0, 8+i, 2*g+1), vb[g][i]); hw(dm(1, 8+i, 2*g+1), vc[g][i]);
      end
    hw(16'h3002, {22'd0, 1'b0, 3'b111, 2'd2, 2'd1, 2'd0});
    hw(16'h3000, 32'h2);

    // run and time it
    @(negedge clk); h_en = 1; h_we = 1; h_addr = 16'h3000; h_wdata = 32'h1;
    @(negedge clk); h_en = 0; h_we = 0;
    cyc = 1;
    while (!irq_done && cyc < 1000) begin @(negedge clk); cyc++; end
    ck(irq_done, "kernel finished");
    $display("complex multiplication: 16 products (32 result words) in %0d cycles from start to done", cyc);
    hw(16'h3000, 32'h2);

    for (int g = 0; g < 2; g++)
      for (int i = 0; i < 8; i++)
        for (int part = 0; part < 2; part++) begin
          real x, r, tol;
          hr(dm(2, 16 + i, 2*g + part), d);
          x = (part == 0) ? f2r(va[g][i]) * f2r(vc[g][i]) - f2r(vb[g][i]) * f2r(vd[g][i])
                          : f2r(va[g][i]) * f2r(vd[g][i]) + f2r(vb[g][i]) * f2r(vc[g][i]);
          r = f2r(d);
          // cancellation can leave few significant bits: tolerance relative
          // to the size of the products
          tol = ((f2r(va[g][i]) < 0 ? -f2r(va[g][i]) : f2r(va[g][i])) + (f2r(vb[g][i]) < 0 ? -f2r(vb[g][i]) : f2r(vb[g][i])))
              * ((f2r(vc[g][i]) < 0 ? -f2r(vc[g][i]) : f2r(vc[g][i])) + (f2r(vd[g][i]) < 0 ? -f2r(vd[g][i]) : f2r(vd[g][i])))
              / 32768.0 * 3.0;
          ck((r - x <= tol) && (x - r <= tol),
             $sformatf("set %0d iteration %0d %s: %g expected %g", g, i, part == 0 ? "real" : "imag", r, x));
        end
    // ---------------- integer complex multiplication (16-bit, wrap-around)
    // Same schedule with MUL (2 cycles) and SUB/ADD in contexts 20..31; in
    // integer mode each row is its own lane half, so 32 products run at once.
    for (int e = 20; e <= 31; e++)
      for (int r = 0; r < 8; r++) begin
        ctx_t c;
        c = '0;
        case (e)
          20: begin c = cx(OP_MUL, SRC_BUS0, SRC_BUS1, 0, 0); c.rf_we = 1'b1; end
          28: c = cx(OP_MUL, SRC_BUS0, SRC_BUS1, 8, 0);
          30: c = cx((r / 2) % 2 == 0 ? OP_SUB : OP_ADD, SRC_RF, SRC_SELF, 0, 0);
          31: c = cx(OP_NOP, SRC_ZERO, SRC_ZERO, 16, 1);
          default: c = '0;
        endcase
        hw(16'(e * 8 + r), 32'(c));
      end
    hw(16'h1000, {1'b1, 7'd11, 8'd20});
    for (int g = 0; g < 2; g++)
      for (int i = 0; i < 8; i++) begin
        ia[g][i] = $urandom; ib[g][i] = $urandom; ic[g][i] = $urandom; id[g][i] = $urandom;
        hw(dm(0, i, 2*g), ia[g][i]);     hw(dm(1, i, 2*g), ic[g][i]);
        hw(dm(0, 8+i, 2*g), ib[g][i]);   hw(dm(1, 8+i, 2*g), id[g][i]);
        hw(dm(0, i, 2*g+1), ia[g][i]);   hw(dm(1, i, 2*g+1), id[g][i]);
        hw(dm(0, 8+i, 2*g+1), ib[g][i]); hw(dm(1, 8+i, 2*g+1), ic[g][i]);
      end
    hw(16'h3002, {22'd0, 1'b0, 3'b000, 2'd2, 2'd1, 2'd0});
    hw(16'h3000, 32'h2);
    @(negedge clk); h_en = 1; h_we = 1; h_addr = 16'h3000; h_wdata = 32'h1;
    @(negedge clk); h_en = 0; h_we = 0;
    cyc = 1;
    while (!irq_done && cyc < 1000) begin @(negedge clk); cyc++; end
    ck(irq_done, "integer kernel finished");
    $display("integer complex multiplication: 32 products in %0d cycles from start to done", cyc);
    hw(16'h3000, 32'h2);
    for (int g = 0; g < 2; g++)
      for (int i = 0; i < 8; i++)
        for (int part = 0; part < 2; part++) begin
          logic [15:0] x [2];
          hr(dm(2, 16 + i, 2*g + part), d);
          for (int h = 0; h < 2; h++) begin
            logic [15:0] a1, b1, c1, d1;
            a1 = ia[g][i][16*h +: 16]; b1 = ib[g][i][16*h +: 16];
            c1 = ic[g][i][16*h +: 16]; d1 = id[g][i][16*h +: 16];
            x[h] = (part == 0) ? 16'(a1 * c1) - 16'(b1 * d1) : 16'(a1 * d1) + 16'(b1 * c1);
          end
          ck(d == {x[1], x[0]}, $sformatf("integer set %0d iteration %0d part %0d: %h expected %h",
                                          g, i, part, d, {x[1], x[0]}));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
