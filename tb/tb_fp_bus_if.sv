// tb_fp_bus_if: checks the row-bus interface in integer and floating-point
// mode: half-word split of read words, IEEE-754 split to the mantissa and
// exponent rows (rows 0, 3, 4, 7 are mantissa rows), and packing of stores.
module tb_fp_bus_if;
  import flora_pkg::*;
  localparam int ROWS = 8;
  logic [2:0] fp_mode;
  logic [MEM_AW-1:0] a_rd_addr [ROWS][2], m_rd_addr [ROWS][2];
  logic [DW-1:0] a_rd_data [ROWS][2];
  logic a_wr_en [ROWS];
  logic [MEM_AW-1:0] a_wr_addr [ROWS];
  logic [DW-1:0] a_wr_data [ROWS];
  logic [31:0] m_rd_word [ROWS][2];
  logic [1:0] m_wr_be [ROWS/2];
  logic [MEM_AW-1:0] m_wr_addr [ROWS/2];
  logic [31:0] m_wr_word [ROWS/2];
  int checks = 0, failures = 0;

  fp_bus_if #(.ROWS(ROWS)) dut (.*);

  task automatic ck(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int it = 0; it < 50; it++) begin
      logic [31:0] w [ROWS/2];
      fp_mode = 3'($urandom);
      for (int k = 0; k < ROWS/2; k++) w[k] = $urandom;
      for (int r = 0; r < ROWS; r++) begin
        for (int b = 0; b < 2; b++) begin
          a_rd_addr[r][b] = 6'($urandom);
          m_rd_word[r][b] = w[r/2] ^ (b == 1 ? 32'hFFFF_FFFF : 0);
        end
        a_wr_en[r] = 1'b1; a_wr_addr[r] = 6'(r); a_wr_data[r] = 16'($urandom);
      end
      #1;
      for (int r = 0; r < ROWS; r++) begin
        for (int b = 0; b < 2; b++) begin
          logic [31:0] x;
          logic [15:0] e;
          logic mant;
          x = m_rd_word[r][b];
          mant = (r % 4 == 0) || (r % 4 == 3);
          if (fp_mode[b]) e = mant ? {x[31], x[22:8]} : {8'h00, x[30:23]};
          else            e = (r % 2 == 0) ? x[15:0] : x[31:16];
          ck(a_rd_data[r][b] === e && m_rd_addr[r][b] === a_rd_addr[r][b], "read path");
        end
      end
      for (int k = 0; k < ROWS/2; k++) begin
        int mr, er;
        mr = (k % 2 == 0) ? 2*k : 2*k+1;
        er = (k % 2 == 0) ? 2*k+1 : 2*k;
        if (fp_mode[2])
          ck(m_wr_be[k] == 2'b11 && m_wr_addr[k] == 6'(mr) &&
             m_wr_word[k] == {a_wr_data[mr][15], a_wr_data[er][7:0], a_wr_data[mr][14:0], 8'h00}, "fp store");
        else
          ck(m_wr_be[k] == 2'b11 && m_wr_word[k] == {a_wr_data[2*k+1], a_wr_data[2*k]}, "int store");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
