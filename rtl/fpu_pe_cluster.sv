// fpu_pe_cluster: an FPU-PE cluster, the fixed pair of a mantissa PE and an
// exponent PE that together execute one floating-point operation.
//
// The two PEs sit in the same column of vertically adjacent rows. Each keeps
// its own context stream, neighbour links, row buses and shared-unit ports;
// the cluster adds the dedicated pair link between them (the registered FSM
// message link plus each PE seeing the other's output register as the PAIR
// source). In integer mode the two PEs work independently. For a
// floating-point operation both receive the same FP opcode in the same cycle;
// the mantissa PE gets the {sign, fraction} words and the exponent PE the
// exponent words, and the result appears in the two output registers after
// the operation's latency. The fixed clustering ("Fixed" in the document's
// comparison of clustering schemes) is the one used by the fabricated design.
module fpu_pe_cluster
  import flora_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  ctx_t            ctx_m,
  input  ctx_t            ctx_e,
  input  logic [DW-1:0]   nbr_m [8],
  input  logic [DW-1:0]   nbr_e [8],
  input  logic [DW-1:0]   bus0_m, bus1_m, bus0_e, bus1_e,
  output logic            rd0_m, rd1_m, st_m, rd0_e, rd1_e, st_e,
  output logic [MEM_AW-1:0] addr_m, addr_e,
  output logic [DW-1:0]   out_m,
  output logic [DW-1:0]   out_e,
  output logic            busy_m, busy_e, done_m, done_e,
  // shared multiplier ports of the two rows
  output logic            mul_req_m, mul_req_e,
  output logic [DW-1:0]   mul_a_m, mul_b_m, mul_a_e, mul_b_e,
  input  logic [2*DW-1:0] mul_p_m, mul_p_e,
  // divider / square-root ports (mantissa PE only)
  output logic            div_req,
  output logic [DW-1:0]   div_a, div_b,
  input  logic [18:0]     div_q,
  output logic            sqrt_req,
  output logic [37:0]     sqrt_rad,
  input  logic [18:0]     sqrt_root
);
  pair_msg_t m2e, e2m;

  // the exponent PE never uses a divider or square-root unit
  logic          e_div_req, e_sqrt_req;
  logic [DW-1:0] e_div_a, e_div_b;
  logic [37:0]   e_sqrt_rad;

  pe #(.IS_MANT(1'b1)) u_m (
    .clk, .rst_n, .ctx(ctx_m), .nbr(nbr_m), .pair_data(out_e),
    .pmsg_in(e2m), .pmsg_out(m2e), .bus0(bus0_m), .bus1(bus1_m),
    .rd0_en(rd0_m), .rd1_en(rd1_m), .st_en(st_m), .mem_addr(addr_m),
    .out_q(out_m), .busy(busy_m), .done(done_m),
    .mul_req(mul_req_m), .mul_a(mul_a_m), .mul_b(mul_b_m), .mul_p(mul_p_m),
    .div_req, .div_a, .div_b, .div_q,
    .sqrt_req, .sqrt_rad, .sqrt_root);

  pe #(.IS_MANT(1'b0)) u_e (
    .clk, .rst_n, .ctx(ctx_e), .nbr(nbr_e), .pair_data(out_m),
    .pmsg_in(m2e), .pmsg_out(e2m), .bus0(bus0_e), .bus1(bus1_e),
    .rd0_en(rd0_e), .rd1_en(rd1_e), .st_en(st_e), .mem_addr(addr_e),
    .out_q(out_e), .busy(busy_e), .done(done_e),
    .mul_req(mul_req_e), .mul_a(mul_a_e), .mul_b(mul_b_e), .mul_p(mul_p_e),
    .div_req(e_div_req), .div_a(e_div_a), .div_b(e_div_b), .div_q(19'd0),
    .sqrt_req(e_sqrt_req), .sqrt_rad(e_sqrt_rad), .sqrt_root(19'd0));

  // Both PEs of a cluster must start a floating-point operation together.
  property p_fp_paired;
    @(posedge clk) disable iff (!rst_n)
      (!busy_m && !busy_e && is_fp_op(ctx_m.op)) |-> (ctx_e.op == ctx_m.op);
  endproperty
  a_fp_paired: assert property (p_fp_paired)
    else $error("FP opcode issued to one PE of a cluster only");

endmodule
