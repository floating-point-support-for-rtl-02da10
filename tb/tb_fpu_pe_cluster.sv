// tb_fpu_pe_cluster: self-checking test of one FPU-PE cluster with its row's
// shared multiplier, divider and square-root unit.
//
// Issues FADD, FSUB, FMUL, FDIV and FSQRT (and integer MUL and ADD) with random
// and directed operands in the reduced 24-bit format, checks the latency of
// each operation in clock cycles and compares the result with a reference
// computed in double-precision real arithmetic (within 1.5 units in the last
// place), plus exact checks of zero, overflow-to-infinity, divide-by-zero and
// square root of a negative number.
module tb_fpu_pe_cluster;
  import flora_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ctx_t ctx_m, ctx_e;
  logic [DW-1:0] nbr [8];
  logic [DW-1:0] bus0_m, bus1_m, bus0_e, bus1_e;
  logic rd0_m, rd1_m, st_m, rd0_e, rd1_e, st_e;
  logic [MEM_AW-1:0] addr_m, addr_e;
  logic [DW-1:0] out_m, out_e;
  logic busy_m, busy_e, done_m, done_e;
  logic mul_req_m, mul_req_e, div_req, sqrt_req;
  logic [DW-1:0] mul_a_m, mul_b_m, mul_a_e, mul_b_e, div_a, div_b;
  logic [2*DW-1:0] mul_p_m, mul_p_e;
  logic [18:0] div_q, sqrt_root;
  logic [37:0] sqrt_rad;
  logic pv0, pv1, dv, sv;

  for (genvar i = 0; i < 8; i++) begin : g_n
    assign nbr[i] = 16'(i);
  end

  fpu_pe_cluster dut (
    .clk, .rst_n, .ctx_m, .ctx_e, .nbr_m(nbr), .nbr_e(nbr),
    .bus0_m, .bus1_m, .bus0_e, .bus1_e,
    .rd0_m, .rd1_m, .st_m, .rd0_e, .rd1_e, .st_e, .addr_m, .addr_e,
    .out_m, .out_e, .busy_m, .busy_e, .done_m, .done_e,
    .mul_req_m, .mul_req_e, .mul_a_m, .mul_b_m, .mul_a_e, .mul_b_e,
    .mul_p_m, .mul_p_e, .div_req, .div_a, .div_b, .div_q,
    .sqrt_req, .sqrt_rad, .sqrt_root);

  shared_mult u_mm (.clk, .rst_n, .req(mul_req_m), .a(mul_a_m), .b(mul_b_m), .p_valid(pv0), .p(mul_p_m));
  shared_mult u_me (.clk, .rst_n, .req(mul_req_e), .a(mul_a_e), .b(mul_b_e), .p_valid(pv1), .p(mul_p_e));
  shared_div  u_dv (.clk, .rst_n, .req(div_req), .a(div_a), .b(div_b), .q_valid(dv), .q(div_q));
  shared_sqrt u_sq (.clk, .rst_n, .req(sqrt_req), .rad(sqrt_rad), .root_valid(sv), .root(sqrt_root));

  int checks = 0, failures = 0;

  function automatic real pow2(int k);
    real v = 1.0;
    for (int i = 0; i < (k < 0 ? -k : k); i++) v = (k < 0) ? v / 2.0 : v * 2.0;
    return v;
  endfunction

  function automatic real to_real(logic [15:0] m, logic [15:0] e);
    real v;
    if (e[7:0] == 0) return 0.0;
    v = (1.0 + real'(m[14:0]) / 32768.0) * pow2(int'(e[7:0]) - 127);
    return m[15] ? -v : v;
  endfunction

  function automatic ctx_t mk(op_e op);
    ctx_t c = '0;
    c.op = op; c.sa = SRC_BUS0; c.sb = SRC_BUS1;
    return c;
  endfunction

  task automatic run(input op_e op, input logic [15:0] am, ae, bm, be,
                     output logic [15:0] rm, re);
    int n;
    @(negedge clk);
    ctx_m = mk(op); ctx_e = mk(op);
    bus0_m = am; bus1_m = bm; bus0_e = ae; bus1_e = be;
    n = 0;
    do begin
      @(posedge clk); n++;
      @(negedge clk); ctx_m = '0; ctx_e = '0;
    end while (!(done_m && done_e) && n < 20);
    checks++;
    if (n != int'(op_latency(op))) begin
      failures++;
      $display("FAIL latency %s: %0d cycles, expected %0d", op.name(), n, op_latency(op));
    end
    rm = out_m; re = out_e;
  endtask

  task automatic check_fp(input op_e op, input logic [15:0] am, ae, bm, be);
    logic [15:0] rm, re;
    real a, b, x, r, ulp;
    run(op, am, ae, bm, be, rm, re);
    a = to_real(am, ae); b = to_real(bm, be);
    case (op)
      OP_FADD: x = a + b;
      OP_FSUB: x = a - b;
      OP_FMUL: x = a * b;
      OP_FDIV: x = a / b;
      default: x = $sqrt(a);
    endcase
    r = to_real(rm, re);
    ulp = (x < 0 ? -x : x) / 32768.0;
    checks++;
    if ((r - x > 1.5 * ulp) || (x - r > 1.5 * ulp) || (x != 0.0 && re[7:0] == 0)) begin
      failures++;
      $display("FAIL %s %h/%h %h/%h -> %h/%h = %g, expected %g", op.name(), am, ae, bm, be, rm, re, r, x);
    end
  endtask

  task automatic check_exact(input op_e op, input logic [15:0] am, ae, bm, be, xm, xe);
    logic [15:0] rm, re;
    run(op, am, ae, bm, be, rm, re);
    checks++;
    if (rm !== xm || re !== xe) begin
      failures++;
      $display("FAIL exact %s -> %h/%h, expected %h/%h", op.name(), rm, re, xm, xe);
    end
  endtask

  function automatic logic [15:0] rexp(); return 16'(100 + ($urandom % 55)); endfunction

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rm, re;
    ctx_m = '0; ctx_e = '0;
    bus0_m = '0; bus1_m = '0; bus0_e = '0; bus1_e = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed: 1.0 + 1.0 = 2.0
    check_exact(OP_FADD, 16'h0000, 16'd127, 16'h0000, 16'd127, 16'h0000, 16'd128);
    // 1.5 * 2.0 = 3.0
    check_exact(OP_FMUL, 16'h4000, 16'd127, 16'h0000, 16'd128, 16'h4000, 16'd128);
    // 3.0 / 2.0 = 1.5
    check_exact(OP_FDIV, 16'h4000, 16'd128, 16'h0000, 16'd128, 16'h4000, 16'd127);
    // sqrt(4.0) = 2.0, sqrt(2.25) = 1.5
    check_exact(OP_FSQRT, 16'h0000, 16'd129, 16'h0000, 16'd0, 16'h0000, 16'd128);
    check_exact(OP_FSQRT, 16'h1000, 16'd128, 16'h0000, 16'd0, 16'h4000, 16'd127);
    // x - x = +0
    check_exact(OP_FSUB, 16'h1234, 16'd130, 16'h1234, 16'd130, 16'h0000, 16'd0);
    // x + 0 = x
    check_exact(OP_FADD, 16'h9234, 16'd130, 16'h0000, 16'd0, 16'h9234, 16'd130);
    // overflow: 2^127 * 2^127 saturates to infinity
    check_exact(OP_FMUL, 16'h0000, 16'd254, 16'h8000, 16'd254, 16'h8000, 16'h00FF);
    // underflow: 2^-120 * 2^-120 flushes to zero
    check_exact(OP_FMUL, 16'h0000, 16'd7, 16'h0000, 16'd7, 16'h0000, 16'h0000);
    // overflow through addition: (2-ulp)*2^127 + same
    check_exact(OP_FADD, 16'h7FFF, 16'd254, 16'h7FFF, 16'd254, 16'h0000, 16'h00FF);
    // division by zero -> infinity, sqrt of negative -> NaN
    check_exact(OP_FDIV, 16'h0000, 16'd127, 16'h0000, 16'd0, 16'h0000, 16'h00FF);
    check_exact(OP_FSQRT, 16'h8000, 16'd127, 16'h0000, 16'd0, 16'h4000, 16'h00FF);
    // integer multiply and add on both PEs
    check_exact(OP_MUL, 16'd300, 16'd7, 16'd5, 16'd9, 16'd1500, 16'd63);
    check_exact(OP_ADD, 16'd300, 16'd7, 16'hFFFF, 16'd9, 16'd299, 16'd16);
    // random
    for (int i = 0; i < 300; i++) begin
      logic [15:0] am, bm, ae, be;
      am = 16'($urandom); bm = 16'($urandom);
      ae = rexp(); be = rexp();
      case (i % 5)
        0: check_fp(OP_FADD, am, ae, bm, be);
        1: check_fp(OP_FSUB, am, ae, bm, (i % 3 == 0) ? ae : be);
        2: check_fp(OP_FMUL, am, ae, bm, be);
        3: check_fp(OP_FDIV, am, ae, bm, be);
        default: check_fp(OP_FSQRT, {1'b0, am[14:0]}, ae, bm, be);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
