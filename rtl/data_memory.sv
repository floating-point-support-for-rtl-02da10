// data_memory: the double-buffered data memory of the RCM.
//
// Two sets of three banks. One set (selected by `act_set`) serves the PE
// array while the host side reads and writes the other one, so the next
// block of data can be moved in while the array computes (double buffering).
// Each bank holds 2**AW entries of LANES 32-bit words; lane k feeds rows 2k
// and 2k+1 of the array. Control inputs attach a bank to each of the array's
// three buses: two read buses and one write bus. Every row reads its lane of
// the bank on each read bus at its own address (asynchronous read); writes
// are per lane with a 16-bit half-word enable and take effect at the clock
// edge. The host port addresses {bank, entry, lane} of the inactive set, reads
// asynchronously and writes on the clock edge. The set/bank organisation and
// the default size of 6144 bytes (2 x 3 x 64 x 4 x 4 bytes) follow the
// document; the lane organisation and ports are this design's choice.
module data_memory #(
  parameter int unsigned ROWS = 8,
  parameter int unsigned AW   = 6
) (
  input  logic          clk,
  input  logic          act_set,
  input  logic [1:0]    bank_sel [3],        // bank on read bus 0, read bus 1, write bus
  // array side
  input  logic [AW-1:0] rd_addr [ROWS][2],
  output logic [31:0]   rd_word [ROWS][2],
  input  logic [1:0]    wr_be   [ROWS/2],    // half-word enables per lane
  input  logic [AW-1:0] wr_addr [ROWS/2],
  input  logic [31:0]   wr_word [ROWS/2],
  // host side (inactive set)
  input  logic          h_we,
  input  logic [$clog2(ROWS/2)+AW+1:0] h_addr,   // {bank[1:0], entry, lane}
  input  logic [31:0]   h_wdata,
  output logic [31:0]   h_rdata
);
  localparam int unsigned LANES = ROWS / 2;
  localparam int unsigned LW    = $clog2(LANES);
  localparam int unsigned DEPTH = 2 * 3 * (2**AW) * LANES;

  logic [31:0] mem [DEPTH];

  function automatic int unsigned idx(logic s, logic [1:0] b, logic [AW-1:0] a, int unsigned l);
    return ((int'(s) * 3 + int'(b)) * (2**AW) + int'(a)) * LANES + l;
  endfunction

  for (genvar r = 0; r < ROWS; r++) begin : g_rd
    for (genvar b = 0; b < 2; b++) begin : g_bus
      assign rd_word[r][b] = mem[idx(act_set, bank_sel[b], rd_addr[r][b], r / 2)];
    end
  end

  logic [LW-1:0]  h_lane;
  logic [AW-1:0]  h_entry;
  logic [1:0]     h_bank;
  assign {h_bank, h_entry, h_lane} = h_addr;
  assign h_rdata = (h_bank == 2'd3) ? '0 : mem[idx(!act_set, h_bank, h_entry, int'(h_lane))];

  always_ff @(posedge clk) begin
    for (int l = 0; l < int'(LANES); l++) begin
      if (wr_be[l][0]) mem[idx(act_set, bank_sel[2], wr_addr[l], l)][15:0]  <= wr_word[l][15:0];
      if (wr_be[l][1]) mem[idx(act_set, bank_sel[2], wr_addr[l], l)][31:16] <= wr_word[l][31:16];
    end
    if (h_we && h_bank != 2'd3) mem[idx(!act_set, h_bank, h_entry, int'(h_lane))] <= h_wdata;
  end
endmodule
