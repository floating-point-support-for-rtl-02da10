// tb_ccu: loads an MCO table with repeated and varied macro configuration
// operations and checks the exact address sequence, one address per cycle with
// no gaps, and the done pulse after the MCO marked last.
module tb_ccu;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, cfg_en, running, done, h_we;
  logic [7:0] cfg_addr;
  logic [5:0] h_addr;
  logic [15:0] h_wdata;
  int checks = 0, failures = 0;
  ccu dut (.*);
  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int expq [$];
    start = 0; h_we = 0; h_addr = 0; h_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      int n;
      n = 1 + $urandom % 8;
      expq = {};
      for (int m = 0; m < n; m++) begin
        int st, cnt;
        st = $urandom % 160; cnt = 1 + $urandom % 16;
        if (m == 2) begin st = 10; cnt = 3; end
        @(negedge clk);
        h_we = 1; h_addr = 6'(m); h_wdata = {(m == n-1) ? 1'b1 : 1'b0, 7'(cnt-1), 8'(st)};
        for (int k = 0; k < cnt; k++) expq.push_back(st + k);
      end
      @(negedge clk); h_we = 0; start = 1;
      @(negedge clk); start = 0;
      for (int k = 0; k < expq.size(); k++) begin
        checks++;
        if (!cfg_en || int'(cfg_addr) != expq[k]) begin
          failures++; $display("FAIL run %0d address %0d: %0d/%b, expected %0d", run, k, cfg_addr, cfg_en, expq[k]);
        end
        @(negedge clk);
      end
      checks++;
      if (cfg_en || !done) begin failures++; $display("FAIL run %0d does not end", run); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
