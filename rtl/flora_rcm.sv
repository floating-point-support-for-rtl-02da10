// flora_rcm: reconfigurable computing module (RCM) of FloRA, a coarse-grained
// reconfigurable array whose 16-bit integer PEs also execute floating-point
// operations in pairs.
//
// Contents: the ROWS x COLS PE array with its shared multipliers, dividers and
// square-root units (pe_array); the configuration memory and the
// configuration control unit with its MCO table (config_memory, ccu); the
// double-buffered data memory (data_memory) reached through the row buses and
// the floating-point format converters (fp_bus_if); and the execution control
// unit (exec_ctrl).
//
// Host port: a simple synchronous word bus standing for the system-bus slave
// through which the host processor and DMA controller reach the RCM. A write
// (h_en & h_we) takes effect at the clock edge; a read returns h_rdata in the
// same cycle. Address map (word addresses, h_addr[15:12] selects the region):
//   0x0xxx configuration memory, index entry*ROWS + row (write only)
//   0x1xxx MCO table entry, 16-bit MCO in h_wdata[15:0] (write only)
//   0x2xxx data memory, inactive set, index {bank, entry, lane}
//   0x3xxx control registers of exec_ctrl
// `irq_done` is high while the last kernel has finished. The organisation
// follows the document's Fig. 2.1; the host bus protocol and address map are
// this design's choice (the fabricated chip uses AHB).
module flora_rcm
  import flora_pkg::*;
#(
  parameter int unsigned ROWS      = 8,
  parameter int unsigned COLS      = 8,
  parameter int unsigned CFG_DEPTH = 176,
  parameter int unsigned N_MCO     = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        h_en,
  input  logic        h_we,
  input  logic [15:0] h_addr,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata,
  output logic        irq_done
);
  localparam int unsigned DM_AW = $clog2(ROWS/2) + MEM_AW + 2;

  logic [3:0] region;
  assign region = h_addr[15:12];

  // ------------------------------------------------------------ control
  logic        ccu_start, ccu_done, ccu_running, cfg_en, array_busy, act_set, ec_busy;
  logic [1:0]  bank_sel [3];
  logic [2:0]  fp_mode;
  logic        spatial;
  logic [31:0] ec_rdata, dm_rdata;
  logic [$clog2(CFG_DEPTH)-1:0] cfg_addr;

  exec_ctrl #(.COLS(COLS)) u_ec (
    .clk, .rst_n, .h_en(h_en && region == 4'h3), .h_we, .h_addr(h_addr[1:0]),
    .h_wdata, .h_rdata(ec_rdata), .ccu_start, .ccu_done, .array_busy,
    .act_set, .bank_sel, .fp_mode, .spatial, .busy(ec_busy), .done(irq_done));

  ccu #(.N_MCO(N_MCO), .CAW($clog2(CFG_DEPTH))) u_ccu (
    .clk, .rst_n, .start(ccu_start), .cfg_en, .cfg_addr, .running(ccu_running),
    .done(ccu_done), .h_we(h_en && h_we && region == 4'h1),
    .h_addr(h_addr[$clog2(N_MCO)-1:0]), .h_wdata(h_wdata[15:0]));

  ctx_t ctx_row [ROWS];
  ctx_t ctx_pe  [ROWS][COLS];
  config_memory #(.ROWS(ROWS), .COLS(COLS), .DEPTH(CFG_DEPTH)) u_cfg (
    .clk, .rst_n, .spatial, .rd_en(cfg_en), .rd_addr(cfg_addr), .ctx_row, .ctx_pe,
    .h_we(h_en && h_we && region == 4'h0),
    .h_addr(h_addr[$clog2(CFG_DEPTH*ROWS)-1:0]), .h_wdata);

  // ------------------------------------------------------------ array
  logic              a_rd_en   [ROWS][2];
  logic [MEM_AW-1:0] a_rd_addr [ROWS][2];
  logic [DW-1:0]     a_rd_data [ROWS][2];
  logic              a_wr_en   [ROWS];
  logic [MEM_AW-1:0] a_wr_addr [ROWS];
  logic [DW-1:0]     a_wr_data [ROWS];
  logic [DW-1:0]     pe_out    [ROWS][COLS];

  pe_array #(.ROWS(ROWS), .COLS(COLS)) u_arr (
    .clk, .rst_n, .spatial, .ctx_row, .ctx_pe, .rd_en(a_rd_en), .rd_addr(a_rd_addr), .rd_data(a_rd_data),
    .wr_en(a_wr_en), .wr_addr(a_wr_addr), .wr_data(a_wr_data), .pe_out,
    .busy_any(array_busy));

  // ------------------------------------------------------------ data memory
  logic [MEM_AW-1:0] m_rd_addr [ROWS][2];
  logic [31:0]       m_rd_word [ROWS][2];
  logic [1:0]        m_wr_be   [ROWS/2];
  logic [MEM_AW-1:0] m_wr_addr [ROWS/2];
  logic [31:0]       m_wr_word [ROWS/2];

  fp_bus_if #(.ROWS(ROWS)) u_bif (
    .fp_mode, .a_rd_addr, .a_rd_data, .a_wr_en, .a_wr_addr, .a_wr_data,
    .m_rd_addr, .m_rd_word, .m_wr_be, .m_wr_addr, .m_wr_word);

  data_memory #(.ROWS(ROWS), .AW(MEM_AW)) u_dm (
    .clk, .act_set, .bank_sel, .rd_addr(m_rd_addr), .rd_word(m_rd_word),
    .wr_be(m_wr_be), .wr_addr(m_wr_addr), .wr_word(m_wr_word),
    .h_we(h_en && h_we && region == 4'h2), .h_addr(h_addr[DM_AW-1:0]),
    .h_wdata, .h_rdata(dm_rdata));

  always_comb begin
    case (region)
      4'h2:    h_rdata = dm_rdata;
      4'h3:    h_rdata = ec_rdata;
      default: h_rdata = '0;
    endcase
  end
endmodule
