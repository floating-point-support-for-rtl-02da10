// shared_sqrt: pipelined integer square-root unit shared by the PEs of one row.
//
// Returns root = floor(sqrt(rad)) for a 2*RW-bit radicand, one root bit per
// iteration of the digit-by-digit (restoring) method. The RW iterations are
// spread over LAT pipeline sections with a register between sections, so a
// request in cycle k gives its root in cycle k+LAT-1 and a new request can
// start every cycle. The mantissa PE sends its mantissa scaled by 2^21 (or
// 2^22 for an odd unbiased exponent), so the 19-bit root carries the hidden
// one in bit 18. With LAT = 4 a floating-point square root finishes in 7
// cycles (Table 3.2). The unit's role and sharing follow the document; the
// algorithm and latency are this design's choice.
module shared_sqrt #(
  parameter int unsigned RW  = 19,
  parameter int unsigned LAT = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req,
  input  logic [2*RW-1:0] rad,
  output logic            root_valid,
  output logic [RW-1:0]   root
);
  localparam int unsigned PER = (RW + LAT - 1) / LAT;
  localparam int unsigned XW  = 2 * RW + 2;

  logic [XW-1:0]   st_rem  [LAT];
  logic [RW-1:0]   st_root [LAT];
  logic [2*RW-1:0] st_rad  [LAT];
  logic            st_v    [LAT];
  logic [XW-1:0]   so_rem  [LAT];
  logic [RW-1:0]   so_root [LAT];
  logic [XW-1:0]   trial;

  assign st_rem[0]  = '0;
  assign st_root[0] = '0;
  assign st_rad[0]  = rad;
  assign st_v[0]    = req;

  always_comb begin
    trial = '0;
    for (int s = 0; s < LAT; s++) begin
      so_rem[s]  = st_rem[s];
      so_root[s] = st_root[s];
      for (int k = 0; k < int'(PER); k++) begin
        if (s * int'(PER) + k < int'(RW)) begin
          // bring down the next two radicand bits
          so_rem[s] = (so_rem[s] << 2)
                    | XW'(st_rad[s][2*(RW-1-(s*PER+k)) +: 2]);
          trial = (XW'(so_root[s]) << 2) | XW'(1);
          if (so_rem[s] >= trial) begin
            so_rem[s]  = so_rem[s] - trial;
            so_root[s] = (so_root[s] << 1) | RW'(1);
          end else begin
            so_root[s] = so_root[s] << 1;
          end
        end
      end
    end
  end

  for (genvar s = 1; s < LAT; s++) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st_rem[s]  <= '0;
        st_root[s] <= '0;
        st_rad[s]  <= '0;
        st_v[s]    <= 1'b0;
      end else begin
        st_rem[s]  <= so_rem[s-1];
        st_root[s] <= so_root[s-1];
        st_rad[s]  <= st_rad[s-1];
        st_v[s]    <= st_v[s-1];
      end
    end
  end

  assign root       = so_root[LAT-1];
  assign root_valid = st_v[LAT-1];
endmodule
