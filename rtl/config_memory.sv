// config_memory: the configuration memory, an array of configuration elements
// (CEs), one per PE, that supplies the PE array with context words.
//
// The ROWS x COLS CEs each hold SEG = DEPTH/COLS 32-bit context words. The
// memory supports the two mapping strategies:
//   temporal (spatial = 0): the CEs of a row together form one list of DEPTH
//     words for that row; address a is word a % SEG of CE (row, a / SEG). The
//     ROWS words of address a are registered onto ctx_row, which drives
//     column 0 of the array (the other columns get them later, see pe_array).
//   spatial (spatial = 1): every CE feeds its own PE; address a (< SEG) reads
//     word a of every CE onto ctx_pe[row][col].
// Without `rd_en` (or with an address out of range) the outputs are the
// all-zero NOP context, and the output of the unused mode is NOP too. Reads
// are registered: the word appears in the cycle after the address.
// Host writes go one word at a time to index entry*ROWS + row, where entry is
// the temporal address (so in spatial mode CE (row, col) word w is entry
// col*SEG + w).
// The CE per PE, the two strategies and the 5632-byte size (176 x 8 x 4
// bytes) follow the document; the word width and the way the two views share
// the CEs are this design's choices.
module config_memory
  import flora_pkg::*;
#(
  parameter int unsigned ROWS  = 8,
  parameter int unsigned COLS  = 8,
  parameter int unsigned DEPTH = 176
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          spatial,       // mapping strategy
  input  logic                          rd_en,
  input  logic [$clog2(DEPTH)-1:0]      rd_addr,
  output ctx_t                          ctx_row [ROWS],       // temporal mode
  output ctx_t                          ctx_pe  [ROWS][COLS], // spatial mode
  input  logic                          h_we,
  input  logic [$clog2(DEPTH*ROWS)-1:0] h_addr,
  input  logic [CTX_W-1:0]              h_wdata
);
  localparam int unsigned SEG = DEPTH / COLS;

  // decode of the host index and of the temporal read address
  int unsigned h_entry, h_row, t_ce, t_word;
  assign h_entry = int'(h_addr) / ROWS;
  assign h_row   = int'(h_addr) % ROWS;
  assign t_ce    = int'(rd_addr) / SEG;
  assign t_word  = int'(rd_addr) % SEG;

  logic [CTX_W-1:0] rdw [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      logic [CTX_W-1:0] ce [SEG];
      always_ff @(posedge clk) begin
        if (h_we && h_row == r && h_entry / SEG == c) ce[h_entry % SEG] <= h_wdata;
      end
      // one read port per CE; a spatial address is below SEG, so the same
      // word index serves both modes
      assign rdw[r][c] = ce[t_word];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(ROWS); r++) begin
        ctx_row[r] <= '0;
        for (int c = 0; c < int'(COLS); c++) ctx_pe[r][c] <= '0;
      end
    end else begin
      for (int r = 0; r < int'(ROWS); r++) begin
        ctx_row[r] <= (rd_en && !spatial && int'(rd_addr) < int'(DEPTH))
                      ? ctx_t'(rdw[r][t_ce]) : '0;
        for (int c = 0; c < int'(COLS); c++)
          ctx_pe[r][c] <= (rd_en && spatial && int'(rd_addr) < int'(SEG))
                          ? ctx_t'(rdw[r][c]) : '0;
      end
    end
  end
endmodule
