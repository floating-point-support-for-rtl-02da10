// ccu: configuration control unit with macro configuration.
//
// The MCO table holds macro configuration operations, 16 bits each:
// [7:0] start address in the configuration memory, [14:8] address count
// minus one, [15] last MCO of the kernel. After `start` the unit walks the
// table from entry 0 and, for each MCO, presents the configuration-memory
// addresses start, start+1, ..., start+count-1, one per cycle, with no gap
// between MCOs; after the last address of the MCO marked last it pulses
// `done`. Repeating an MCO in the table reuses the same stretch of context
// words without storing them twice. The table is written by the host. The
// table size (128 bytes = 64 MCOs) and the 2-byte MCO follow the document; the
// field layout is this design's choice ("start address, address count, etc.").
module ccu #(
  parameter int unsigned N_MCO = 64,
  parameter int unsigned CAW   = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     cfg_en,
  output logic [CAW-1:0]           cfg_addr,
  output logic                     running,
  output logic                     done,
  input  logic                     h_we,
  input  logic [$clog2(N_MCO)-1:0] h_addr,
  input  logic [15:0]              h_wdata
);
  typedef struct packed {
    logic       last;
    logic [6:0] cnt_m1;
    logic [7:0] start_addr;
  } mco_t;

  mco_t                     table_q [N_MCO];
  logic [$clog2(N_MCO)-1:0] idx_q;
  logic [6:0]               off_q;
  mco_t                     cur;

  assign cur      = table_q[idx_q];
  assign cfg_en   = running;
  assign cfg_addr = CAW'(cur.start_addr) + CAW'(off_q);

  always_ff @(posedge clk) begin
    if (h_we) table_q[h_addr] <= mco_t'(h_wdata);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      idx_q   <= '0;
      off_q   <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          idx_q   <= '0;
          off_q   <= '0;
        end
      end else if (off_q == cur.cnt_m1) begin
        off_q <= '0;
        if (cur.last || idx_q == $clog2(N_MCO)'(N_MCO - 1)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else begin
          idx_q <= idx_q + 1'b1;
        end
      end else begin
        off_q <= off_q + 1'b1;
      end
    end
  end
endmodule
