// fp_bus_if: the row-bus interface between the data memory and the PE array,
// with the floating-point format converters.
//
// Each lane word of the data memory (32 bits) serves a row pair. On a read
// bus in floating-point mode the word is an IEEE-754 single value: the FP
// converter splits it, the mantissa row of the pair receives {sign, 15-bit
// fraction} and the exponent row the zero-extended exponent. In integer mode
// the even row receives the low half-word and the odd row the high half-word.
// On the write bus in floating-point mode the mantissa and exponent words the
// two rows store in the same cycle are packed back into an IEEE-754 word
// (eight zero fraction LSBs) at the mantissa row's address; in integer mode
// each row writes its own half-word. Combinational. The converters are
// plain re-arrangements of bit fields and are written inline. Converter placement per
// row pair and the mode multiplexers follow Fig. 3.2; the integer half-word
// mapping is this design's choice.
module fp_bus_if
  import flora_pkg::*;
#(
  parameter int unsigned ROWS = 8
) (
  input  logic [2:0]        fp_mode,          // per bus: read 0, read 1, write
  // array side
  input  logic [MEM_AW-1:0] a_rd_addr [ROWS][2],
  output logic [DW-1:0]     a_rd_data [ROWS][2],
  input  logic              a_wr_en   [ROWS],
  input  logic [MEM_AW-1:0] a_wr_addr [ROWS],
  input  logic [DW-1:0]     a_wr_data [ROWS],
  // memory side
  output logic [MEM_AW-1:0] m_rd_addr [ROWS][2],
  input  logic [31:0]       m_rd_word [ROWS][2],
  output logic [1:0]        m_wr_be   [ROWS/2],
  output logic [MEM_AW-1:0] m_wr_addr [ROWS/2],
  output logic [31:0]       m_wr_word [ROWS/2]
);
  assign m_rd_addr = a_rd_addr;

  for (genvar r = 0; r < ROWS; r++) begin : g_rd
    for (genvar b = 0; b < 2; b++) begin : g_b
      logic [15:0] mw, ew;
      // FP convert on load: keep sign and the 15 upper fraction bits, drop
      // the 8 lower ones; the exponent goes to the low byte of its word
      assign mw = {m_rd_word[r][b][31], m_rd_word[r][b][22:8]};
      assign ew = {8'h00, m_rd_word[r][b][30:23]};
      assign a_rd_data[r][b] = fp_mode[b] ? (is_mant_row(r) ? mw : ew)
                                          : ((r % 2 == 0) ? m_rd_word[r][b][15:0]
                                                          : m_rd_word[r][b][31:16]);
    end
  end

  for (genvar k = 0; k < ROWS / 2; k++) begin : g_wr
    localparam int MR = is_mant_row(2*k) ? 2*k : 2*k + 1;
    localparam int ER = is_mant_row(2*k) ? 2*k + 1 : 2*k;
    logic [31:0] ieee;
    // FP convert on store: reassemble the IEEE-754 word, low fraction bits zero
    assign ieee = {a_wr_data[MR][15], a_wr_data[ER][7:0], a_wr_data[MR][14:0], 8'h00};
    always_comb begin
      if (fp_mode[2]) begin
        m_wr_be[k]   = {2{a_wr_en[MR]}};
        m_wr_addr[k] = a_wr_addr[MR];
        m_wr_word[k] = ieee;
      end else begin
        m_wr_be[k]   = {a_wr_en[2*k+1], a_wr_en[2*k]};
        // both rows of a pair store to the same entry when both write
        m_wr_addr[k] = a_wr_en[2*k] ? a_wr_addr[2*k] : a_wr_addr[2*k+1];
        m_wr_word[k] = {a_wr_data[2*k+1], a_wr_data[2*k]};
      end
    end
  end
endmodule
