// shared_div: pipelined mantissa divider shared by the PEs of one row.
//
// Divides two normalised mantissas a = 1.f_a and b = 1.f_b (16-bit, 15
// fraction bits) and returns q = floor(a * 2^18 / b), a 19-bit quotient whose
// value a/b lies in (0.5, 2). Restoring division, one quotient bit per
// iteration; the 19 iterations are spread over LAT pipeline sections with a
// register between sections. A request in cycle k gives its quotient in
// cycle k+LAT-1; a new request can start every cycle. With LAT = 5 a
// floating-point division finishes in 7 cycles (Table 3.2). The document gives
// the unit's role and sharing; the algorithm and its latency are this design's
// choice.
module shared_div #(
  parameter int unsigned W   = 16,
  parameter int unsigned QW  = 19,
  parameter int unsigned LAT = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic [W-1:0]  a,      // dividend, requires a < 2*b
  input  logic [W-1:0]  b,      // divisor, non-zero
  output logic          q_valid,
  output logic [QW-1:0] q
);
  localparam int unsigned PER = (QW + LAT - 1) / LAT;
  localparam int unsigned RW  = W + 2;

  logic [RW-1:0] st_r [LAT];   // partial remainder entering each section
  logic [QW-1:0] st_q [LAT];
  logic [W-1:0]  st_b [LAT];
  logic          st_v [LAT];
  logic [RW-1:0] so_r [LAT];
  logic [QW-1:0] so_q [LAT];

  assign st_r[0] = RW'(a);
  assign st_q[0] = '0;
  assign st_b[0] = b;
  assign st_v[0] = req;

  always_comb begin
    for (int s = 0; s < LAT; s++) begin
      so_r[s] = st_r[s];
      so_q[s] = st_q[s];
      for (int k = 0; k < int'(PER); k++) begin
        if (s * int'(PER) + k < int'(QW)) begin
          if (so_r[s] >= RW'(st_b[s])) begin
            so_r[s] = so_r[s] - RW'(st_b[s]);
            so_q[s][QW-1-(s*PER+k)] = 1'b1;
          end
          so_r[s] = so_r[s] << 1;
        end
      end
    end
  end

  for (genvar s = 1; s < LAT; s++) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st_r[s] <= '0;
        st_q[s] <= '0;
        st_b[s] <= '0;
        st_v[s] <= 1'b0;
      end else begin
        st_r[s] <= so_r[s-1];
        st_q[s] <= so_q[s-1];
        st_b[s] <= st_b[s-1];
        st_v[s] <= st_v[s-1];
      end
    end
  end

  assign q       = so_q[LAT-1];
  assign q_valid = st_v[LAT-1];
endmodule
