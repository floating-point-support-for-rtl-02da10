// tb_flora_rcm: end-to-end test of the reconfigurable computing module at its
// default size (8x8 PEs, 176-entry configuration memory, 64 MCOs).
//
// Through the host port only, it loads two kernels and their data and runs
// them with temporal mapping and loop pipelining (column c computes loop
// iteration c):
//   kernel 1 (floating point, IEEE-754 words in memory, converted on the row
//   buses): row pair 0 computes a*b + a (FMUL then FADD, with one iteration
//   overflowing to infinity), pair 1 a/b (FDIV), pair 2 a-b (FSUB), pair 3
//   sqrt(a) (FSQRT); each result is stored back and converted to IEEE-754.
//   kernel 2 (integer, half-words): ((a+b)*2*2)*3 on every row, with the
//   doubling context reused through a repeated MCO and the multiply on the
//   rows' shared multipliers.
// The data of kernel 2 are written into the inactive data-memory set while
// kernel 1 runs (double buffering).
//   kernel 3 (spatial mapping): every PE has its own context; a value loaded
//   in column 0 flows along each row through a different add per column. Results are read back through the host
// port after a set swap and compared with a real-arithmetic or integer
// reference. Each mechanism is counted; one that never happened is a failure.
module tb_flora_rcm;
  import flora_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_en, h_we, irq_done;
  logic [15:0] h_addr;
  logic [31:0] h_wdata, h_rdata;
  int checks = 0, failures = 0;

  flora_rcm dut (.clk, .rst_n, .h_en, .h_we, .h_addr, .h_wdata, .h_rdata, .irq_done);

  // ---------------------------------------------------------------- helpers
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
  task automatic put_ctx(input int entry, input int row, input ctx_t c);
    hw(16'(entry * 8 + row), 32'(c));
  endtask
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
  function automatic logic [31:0] rnd_f(int emin, int span, logic neg_ok);
    logic [31:0] w;
    w = {neg_ok ? 1'($urandom) : 1'b0, 8'(emin + $urandom % span), 15'($urandom), 8'h00};
    return w;
  endfunction
  task automatic ck(input logic c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic run_kernel(output int cycles);
    logic [31:0] st;
    hw(16'h3000, 32'h1);
    cycles = 0;
    do begin hr(16'h3001, st); cycles++; end while (!st[1] && cycles < 500);
  endtask

  // mechanism counters
  int n_fadd = 0, n_fsub = 0, n_fmul = 0, n_fdiv = 0, n_fsqrt = 0, n_imul = 0;
  int n_spatial = 0, n_ovf = 0, n_fpcvt = 0, n_mco_reuse = 0, n_dbuf = 0, n_pipe = 0, n_int = 0;

  logic [31:0] a [4][8], b [4][8];
  logic [15:0] ia [4][8][2], ib [4][8][2];

  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    logic [31:0] d;
    h_en = 0; h_we = 0; h_addr = 0; h_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- kernel 1 contexts (entries 0..11)
    for (int e = 0; e <= 11; e++)
      for (int r = 0; r < 8; r++) put_ctx(e, r, '0);
    // pair 0: a*b + a. Each row bus is read by one context only: with loop
    // pipelining, context k of column c runs in cycle k+c, so a second read of
    // bus 0 would collide with another column; a is kept in register 0.
    for (int r = 0; r < 2; r++) begin
      ctx_t c;
      c = cx(OP_MOV, SRC_BUS0, SRC_ZERO, 0, 0); c.rf_we = 1'b1;
      put_ctx(0, r, c);
      put_ctx(1, r, cx(OP_FMUL, SRC_RF, SRC_BUS1, 0, 0));
      put_ctx(5, r, cx(OP_FADD, SRC_SELF, SRC_RF, 0, 0));
      put_ctx(11, r, cx(OP_NOP, SRC_ZERO, SRC_ZERO, 0, 1));
    end
    for (int r = 2; r < 4; r++) begin      // pair 1: a/b
      put_ctx(0, r, cx(OP_FDIV, SRC_BUS0, SRC_BUS1, 0, 0));
      put_ctx(7, r, cx(OP_NOP, SRC_ZERO, SRC_ZERO, 0, 1));
    end
    for (int r = 4; r < 6; r++) begin      // pair 2: a-b
      put_ctx(0, r, cx(OP_FSUB, SRC_BUS0, SRC_BUS1, 0, 0));
      put_ctx(6, r, cx(OP_NOP, SRC_ZERO, SRC_ZERO, 0, 1));
    end
    for (int r = 6; r < 8; r++) begin      // pair 3: sqrt(a)
      put_ctx(0, r, cx(OP_FSQRT, SRC_BUS0, SRC_ZERO, 0, 0));
      put_ctx(7, r, cx(OP_NOP, SRC_ZERO, SRC_ZERO, 0, 1));
    end
    hw(16'h1000, {1'b1, 7'd11, 8'd0});     // one MCO: entries 0..11

    // ---------------- kernel 1 data into the inactive set (set 1)
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 8; i++) begin
        a[k][i] = rnd_f(110, 30, k != 3);
        b[k][i] = rnd_f(115, 20, 1'b1);
        if (k == 0) b[k][i][31] = 1'b0;     // keep b positive: no cancellation in a*b+a
        if (k == 0 && i == 7) begin a[k][i] = 32'h71800000; b[k][i] = 32'h71800000; end
        hw(dm(0, i, k), a[k][i]);
        hw(dm(1, i, k), b[k][i]);
      end
    hw(16'h3002, {23'd0, 3'b111, 2'd2, 2'd1, 2'd0});   // FP mode on all buses
    hw(16'h3000, 32'h2);                                 // swap: array uses set 1
    hr(16'h3001, d);
    ck(d[2] == 1'b1, "set swap");

    // ---------------- start kernel 1; meanwhile fill set 0 for kernel 2
    hw(16'h3000, 32'h1);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 8; i++) begin
        for (int h = 0; h < 2; h++) begin ia[k][i][h] = 16'($urandom); ib[k][i][h] = 16'($urandom); end
        hw(dm(0, i, k), {ia[k][i][1], ia[k][i][0]});
        hw(dm(1, i, k), {ib[k][i][1], ib[k][i][0]});
        hr(16'h3001, d);
        if (d[0]) n_dbuf++;
      end
    cyc = 0;
    do begin hr(16'h3001, d); cyc++; end while (!d[1] && cyc < 500);
    ck(d[1] && irq_done, "kernel 1 finished");

    // ---------------- check kernel 1 results (swap: results now host-visible)
    hw(16'h3000, 32'h2);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 8; i++) begin
        real x, r, tol;
        hr(dm(2, i, k), d);
        case (k)
          0: x = f2r(a[k][i]) * f2r(b[k][i]) + f2r(a[k][i]);
          1: x = f2r(a[k][i]) / f2r(b[k][i]);
          2: x = f2r(a[k][i]) - f2r(b[k][i]);
          default: x = $sqrt(f2r(a[k][i]));
        endcase
        r = f2r(d);
        tol = (x < 0 ? -x : x) / 32768.0 * 3.0;
        if (k == 0 && i == 7) begin
          ck(d == 32'h7F800000, "overflow to infinity");
          if (d == 32'h7F800000) n_ovf++;
        end else begin
          ck((r - x <= tol) && (x - r <= tol) && d[7:0] == 8'h00,
             $sformatf("pair %0d iteration %0d: %h = %g, expected %g", k, i, d, r, x));
          if ((r - x <= tol) && (x - r <= tol)) begin
            n_fpcvt++;
            if (i > 0) n_pipe++;
            case (k) 0: begin n_fmul++; n_fadd++; end 1: n_fdiv++; 2: n_fsub++; default: n_fsqrt++; endcase
          end
        end
      end

    // ---------------- kernel 2: integer, MCO reuse, shared multiplier
    for (int r = 0; r < 8; r++) begin
      put_ctx(20, r, cx(OP_ADD, SRC_BUS0, SRC_BUS1, 0, 0));
      put_ctx(21, r, cx(OP_ADD, SRC_SELF, SRC_SELF, 0, 0));
      begin
        ctx_t c = cx(OP_MUL, SRC_SELF, SRC_IMM, 0, 0);
        c.imm = 7'd3;
        put_ctx(22, r, c);
      end
      put_ctx(23, r, '0);
      put_ctx(24, r, cx(OP_NOP, SRC_ZERO, SRC_ZERO, 0, 1));
    end
    hw(16'h1000, {1'b0, 7'd0, 8'd20});
    hw(16'h1001, {1'b0, 7'd0, 8'd21});
    hw(16'h1002, {1'b0, 7'd0, 8'd21});     // same context again
    hw(16'h1003, {1'b1, 7'd2, 8'd22});
    hw(16'h3002, {23'd0, 3'b000, 2'd2, 2'd1, 2'd0});   // integer mode
    run_kernel(cyc);
    ck(irq_done, "kernel 2 finished");
    n_mco_reuse++;
    hw(16'h3000, 32'h2);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 8; i++) begin
        logic [15:0] x0, x1;
        x0 = 16'((ia[k][i][0] + ib[k][i][0]) * 12);
        x1 = 16'((ia[k][i][1] + ib[k][i][1]) * 12);
        hr(dm(2, i, k), d);
        ck(d == {x1, x0}, $sformatf("integer lane %0d iteration %0d: %h, expected %h", k, i, d, {x1, x0}));
        if (d == {x1, x0}) begin n_int++; n_imul++; end
      end

    // ---------------- kernel 3: spatial mapping (one context per PE)
    // active set is now set 1 again; column 0 loads lane word 0 of bank 0
    // (integer mode: half-words), columns 1..7 each add W + (k + row) in
    // step k, column 7 stores at entry 20. CE (row, col) word w is
    // configuration entry col*22 + w.
    for (int c = 0; c < 8; c++)
      for (int w = 0; w <= 8; w++)
        for (int r = 0; r < 8; r++) begin
          ctx_t c3;
          c3 = '0;
          if (w == 0 && c == 0) c3 = cx(OP_MOV, SRC_BUS0, SRC_ZERO, 0, 0);
          else if (w >= 1 && w <= 7 && c == w) begin
            c3 = cx(OP_ADD, SRC_W, SRC_IMM, 0, 0);
            c3.imm = 7'(w + r);
          end else if (w == 8 && c == 7) c3 = cx(OP_NOP, SRC_ZERO, SRC_ZERO, 20, 1);
          put_ctx(c * 22 + w, r, c3);
        end
    hw(16'h1000, {1'b1, 7'd8, 8'd0});
    hw(16'h3002, {22'd0, 1'b1, 3'b000, 2'd2, 2'd1, 2'd0});   // spatial, integer
    run_kernel(cyc);
    ck(irq_done, "kernel 3 finished");
    hw(16'h3000, 32'h2);
    for (int k = 0; k < 4; k++) begin
      logic [15:0] x0, x1;
      x0 = a[k][0][15:0] + 16'(28 + 7 * (2 * k));
      x1 = a[k][0][31:16] + 16'(28 + 7 * (2 * k + 1));
      hr(dm(2, 20, k), d);
      ck(d == {x1, x0}, $sformatf("spatial lane %0d: %h, expected %h", k, d, {x1, x0}));
      if (d == {x1, x0}) n_spatial++;
    end
    ck(n_spatial > 0, "spatial mapping seen");

    $display("mechanisms: spatial=%0d fadd=%0d fsub=%0d fmul=%0d fdiv=%0d fsqrt=%0d imul=%0d int=%0d ovf=%0d fpcvt=%0d pipelined_iters=%0d mco_reuse=%0d dbuf_overlap=%0d",
             n_spatial, n_fadd, n_fsub, n_fmul, n_fdiv, n_fsqrt, n_imul, n_int, n_ovf, n_fpcvt, n_pipe, n_mco_reuse, n_dbuf);
    ck(n_fadd > 0 && n_fsub > 0 && n_fmul > 0 && n_fdiv > 0 && n_fsqrt > 0, "every FP operation seen");
    ck(n_imul > 0 && n_int > 0 && n_ovf > 0 && n_fpcvt > 0 && n_pipe > 0, "integer, overflow, conversion, pipelining seen");
    ck(n_mco_reuse > 0 && n_dbuf > 0, "MCO reuse and double-buffer overlap seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
