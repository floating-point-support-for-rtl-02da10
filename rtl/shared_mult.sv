// shared_mult: pipelined integer multiplier shared by the PEs of one row.
//
// A PE drives `req` with its operands in cycle k; the full product is on `p`
// in cycle k+1 (two pipeline stages, LAT = 2). Stage 1 forms two partial
// products (A times the low and the high byte of B) and registers them;
// stage 2 adds them. The unit accepts a new request every cycle. Requests of
// different PEs of the row are scheduled by the configuration so that at most
// one arrives per cycle; the array ORs the PE requests together. The document
// gives the sharing, the pipelining and the two-cycle latency (Fig. 3.9); the
// partial-product split is this design's choice.
module shared_mult #(
  parameter int unsigned W = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           p_valid,   // result of the request of the previous cycle
  output logic [2*W-1:0] p
);
  localparam int unsigned H = W / 2;

  logic [W+H-1:0] pp_lo_q, pp_hi_q;
  logic           v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q     <= 1'b0;
      pp_lo_q <= '0;
      pp_hi_q <= '0;
    end else begin
      v_q <= req;
      if (req) begin
        pp_lo_q <= (W+H)'(a) * (W+H)'(b[H-1:0]);
        pp_hi_q <= (W+H)'(a) * (W+H)'(b[W-1:H]);
      end
    end
  end

  assign p       = (2*W)'(pp_lo_q) + ((2*W)'(pp_hi_q) << H);
  assign p_valid = v_q;
endmodule
