// tb_wl_dot_product: the 1x4 dot-product benchmark kernel, in floating point
// and in 16-bit integer, run on the whole RCM at its default size through the
// host port.
//
// Each iteration computes a0*b0 + a1*b1 + a2*b2 + a3*b3 inside one FPU-PE
// cluster (floating point) or one PE (integer), keeping the running sum in
// register 0; eight columns run eight iterations (loop pipelining), so the
// four row pairs give 32 floating-point dot products and the eight rows 64
// integer ones per run. Element j of iteration i is at entry 8*j + i of banks
// 0 (a) and 1 (b) in the row pair's lane; the result goes to entry 32 + i of
// bank 2. The products are issued at least 8 contexts apart, so that no two
// columns read a row bus in the same cycle, and each add waits for the
// product before it. The floating-point results are compared with a real
// reference (tolerance from the size of the products), the integer ones
// exactly (modulo 2^16); the cycle count of each run is printed.
module tb_wl_dot_product;
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
  function automatic ctx_t cx(op_e op, src_e sa, src_e sb, int addr, logic st, logic we);
    ctx_t c = '0;
    c.op = op; c.sa = sa; c.sb = sb; c.addr = 6'(addr); c.st = st; c.rf_we = we;
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
  function automatic real fabs(real x);
    return x < 0.0 ? -x : x;
  endfunction
  task automatic ck(input logic c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  // write a program: entry e gets the same context in every row
  task automatic prog(input int e, input ctx_t c);
    for (int r = 0; r < 8; r++) hw(16'(e * 8 + r), 32'(c));
  endtask
  task automatic run(input logic [31:0] buscfg, output int cyc);
    hw(16'h3002, buscfg);
    hw(16'h3000, 32'h2);
    @(negedge clk); h_en = 1; h_we = 1; h_addr = 16'h3000; h_wdata = 32'h1;
    @(negedge clk); h_en = 0; h_we = 0;
    cyc = 1;
    while (!irq_done && cyc < 1000) begin @(negedge clk); cyc++; end
    hw(16'h3000, 32'h2);
  endtask

  logic [31:0] fa [4][8][4], fb [4][8][4];   // [lane][iteration][element]
  logic [31:0] ia [4][8][4], ib [4][8][4];

  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    int cyc;
    h_en = 0; h_we = 0; h_addr = 0; h_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- floating point: entries 0..38
    for (int e = 0; e <= 38; e++) prog(e, '0);
    prog(0,  cx(OP_FMUL, SRC_BUS0, SRC_BUS1, 0, 0, 1));    // rf0 = a0*b0
    prog(8,  cx(OP_FMUL, SRC_BUS0, SRC_BUS1, 8, 0, 0));    // a1*b1
    prog(12, cx(OP_FADD, SRC_RF, SRC_SELF, 0, 0, 1));      // rf0 += ...
    prog(18, cx(OP_FMUL, SRC_BUS0, SRC_BUS1, 16, 0, 0));   // a2*b2
    prog(22, cx(OP_FADD, SRC_RF, SRC_SELF, 0, 0, 1));
    prog(28, cx(OP_FMUL, SRC_BUS0, SRC_BUS1, 24, 0, 0));   // a3*b3
    prog(32, cx(OP_FADD, SRC_RF, SRC_SELF, 0, 0, 0));
    prog(38, cx(OP_NOP, SRC_ZERO, SRC_ZERO, 32, 1, 0));
    hw(16'h1000, {1'b1, 7'd38, 8'd0});
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 4; j++) begin
          fa[k][i][j] = {1'($urandom), 8'(118 + $urandom % 12), 15'($urandom), 8'h00};
          fb[k][i][j] = {1'($urandom), 8'(118 + $urandom % 12), 15'($urandom), 8'h00};
          hw(dm(0, 8*j + i, k), fa[k][i][j]);
          hw(dm(1, 8*j + i, k), fb[k][i][j]);
        end
    run({22'd0, 1'b0, 3'b111, 2'd2, 2'd1, 2'd0}, cyc);
    ck(irq_done, "floating-point run finished");
    $display("floating-point dot product 1x4: 32 results in %0d cycles from start to done", cyc);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 8; i++) begin
        real x, mag;
        x = 0.0; mag = 0.0;
        for (int j = 0; j < 4; j++) begin
          x += f2r(fa[k][i][j]) * f2r(fb[k][i][j]);
          mag += fabs(f2r(fa[k][i][j]) * f2r(fb[k][i][j]));
        end
        hr(dm(2, 32 + i, k), d);
        ck(fabs(f2r(d) - x) <= mag / 32768.0 * 4.0,
           $sformatf("float lane %0d iteration %0d: %g expected %g", k, i, f2r(d), x));
      end

    // ---------------- integer: entries 40..67
    for (int e = 40; e <= 67; e++) prog(e, '0);
    prog(40, cx(OP_MUL, SRC_BUS0, SRC_BUS1, 0, 0, 1));
    prog(48, cx(OP_MUL, SRC_BUS0, SRC_BUS1, 8, 0, 0));
    prog(50, cx(OP_ADD, SRC_RF, SRC_SELF, 0, 0, 1));
    prog(56, cx(OP_MUL, SRC_BUS0, SRC_BUS1, 16, 0, 0));
    prog(58, cx(OP_ADD, SRC_RF, SRC_SELF, 0, 0, 1));
    prog(64, cx(OP_MUL, SRC_BUS0, SRC_BUS1, 24, 0, 0));
    prog(66, cx(OP_ADD, SRC_RF, SRC_SELF, 0, 0, 0));
    prog(67, cx(OP_NOP, SRC_ZERO, SRC_ZERO, 32, 1, 0));
    hw(16'h1000, {1'b1, 7'd27, 8'd40});
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 4; j++) begin
          ia[k][i][j] = $urandom; ib[k][i][j] = $urandom;
          hw(dm(0, 8*j + i, k), ia[k][i][j]);
          hw(dm(1, 8*j + i, k), ib[k][i][j]);
        end
    run({22'd0, 1'b0, 3'b000, 2'd2, 2'd1, 2'd0}, cyc);
    ck(irq_done, "integer run finished");
    $display("integer dot product 1x4: 64 results in %0d cycles from start to done", cyc);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 8; i++) begin
        logic [15:0] x [2];
        for (int h = 0; h < 2; h++) begin
          x[h] = '0;
          for (int j = 0; j < 4; j++)
            x[h] += 16'(ia[k][i][j][16*h +: 16] * ib[k][i][j][16*h +: 16]);
        end
        hr(dm(2, 32 + i, k), d);
        ck(d == {x[1], x[0]}, $sformatf("integer lane %0d iteration %0d: %h expected %h",
                                        k, i, d, {x[1], x[0]}));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
