// tb_config_memory: host writes of context words; in temporal mode the
// registered one-cycle read of all rows of an entry, in spatial mode the
// per-PE words (word w of the CE of row r, column c is entry c*22 + w); NOP
// outputs when no read is requested and on the view of the unused mode.
module tb_config_memory;
  import flora_pkg::*;
  localparam int ROWS = 8, COLS = 8, DEPTH = 176, SEG = DEPTH / COLS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_en, h_we, spatial;
  logic [7:0] rd_addr;
  logic [10:0] h_addr;
  logic [31:0] h_wdata;
  ctx_t ctx_row [ROWS];
  ctx_t ctx_pe [ROWS][COLS];
  logic [31:0] model [DEPTH*ROWS];
  int checks = 0, failures = 0;
  config_memory #(.ROWS(ROWS), .COLS(COLS), .DEPTH(DEPTH)) dut (.*);
  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rd_en = 0; rd_addr = 0; spatial = 0; h_we = 0; h_addr = 0; h_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH*ROWS; i++) begin
      @(negedge clk); h_we = 1; h_addr = 11'(i); h_wdata = $urandom; model[i] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    for (int it = 0; it < 300; it++) begin
      logic en;
      logic [7:0] a;
      logic sp;
      en = ($urandom % 4) != 0;
      sp = it >= 150;
      a = sp ? 8'($urandom % SEG) : 8'($urandom % DEPTH);
      rd_en = en; rd_addr = a; spatial = sp;
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (32'(ctx_row[r]) != ((en && !sp) ? model[int'(a)*ROWS + r] : 32'h0)) begin
          failures++; $display("FAIL entry %0d row %0d", a, r);
        end
        for (int c = 0; c < COLS; c++) begin
          checks++;
          if (32'(ctx_pe[r][c]) != ((en && sp) ? model[(c*SEG + int'(a))*ROWS + r] : 32'h0)) begin
            failures++; $display("FAIL spatial word %0d row %0d col %0d", a, r, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
