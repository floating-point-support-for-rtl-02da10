// tb_data_memory: host writes to the inactive set, set swap, bank-to-bus
// attachment, row reads of each lane, half-word writes from the array side,
// and host read-back, against a reference array.
module tb_data_memory;
  localparam int ROWS = 8, AW = 6, LANES = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic act_set;
  logic [1:0] bank_sel [3];
  logic [AW-1:0] rd_addr [ROWS][2];
  logic [31:0] rd_word [ROWS][2];
  logic [1:0] wr_be [LANES];
  logic [AW-1:0] wr_addr [LANES];
  logic [31:0] wr_word [LANES];
  logic h_we;
  logic [9:0] h_addr;
  logic [31:0] h_wdata, h_rdata;
  logic [31:0] model [2][3][64][LANES];
  int checks = 0, failures = 0;

  data_memory #(.ROWS(ROWS), .AW(AW)) dut (.*);

  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    act_set = 0; h_we = 0; h_addr = 0; h_wdata = 0;
    bank_sel[0] = 0; bank_sel[1] = 1; bank_sel[2] = 2;
    for (int l = 0; l < LANES; l++) begin wr_be[l] = 0; wr_addr[l] = 0; wr_word[l] = 0; end
    for (int r = 0; r < ROWS; r++) begin rd_addr[r][0] = 0; rd_addr[r][1] = 0; end
    // fill both sets through the host port
    for (int s = 0; s < 2; s++) begin
      for (int b = 0; b < 3; b++)
        for (int a = 0; a < 64; a++)
          for (int l = 0; l < LANES; l++) begin
            @(negedge clk);
            h_we = 1; h_addr = {2'(b), 6'(a), 2'(l)}; h_wdata = $urandom;
            model[!act_set][b][a][l] = h_wdata;
          end
      @(negedge clk); h_we = 0;
      act_set = !act_set;
    end
    // random array reads, array writes and host reads
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      if (it % 50 == 0) act_set = !act_set;
      for (int k = 0; k < 3; k++) bank_sel[k] = 2'($urandom % 3);
      for (int r = 0; r < ROWS; r++) begin rd_addr[r][0] = 6'($urandom); rd_addr[r][1] = 6'($urandom); end
      for (int l = 0; l < LANES; l++) begin
        wr_be[l] = 2'($urandom); wr_addr[l] = 6'($urandom); wr_word[l] = $urandom;
      end
      h_addr = {2'($urandom % 3), 6'($urandom), 2'($urandom)};
      #1;
      for (int r = 0; r < ROWS; r++)
        for (int b = 0; b < 2; b++) begin
          checks++;
          if (rd_word[r][b] !== model[act_set][bank_sel[b]][rd_addr[r][b]][r/2]) begin
            failures++; $display("FAIL row %0d bus %0d read", r, b);
          end
        end
      checks++;
      if (h_rdata !== model[!act_set][h_addr[9:8]][h_addr[7:2]][h_addr[1:0]]) begin
        failures++; $display("FAIL host read");
      end
      @(posedge clk);
      for (int l = 0; l < LANES; l++) begin
        if (wr_be[l][0]) model[act_set][bank_sel[2]][wr_addr[l]][l][15:0]  = wr_word[l][15:0];
        if (wr_be[l][1]) model[act_set][bank_sel[2]][wr_addr[l]][l][31:16] = wr_word[l][31:16];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
