// tb_exec_ctrl: register access, start pulse to the configuration control
// unit, drain wait for COLS+1 cycles and for idle PEs, done flag, and data-set
// swap (ignored while running).
module tb_exec_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_en, h_we, ccu_start, ccu_done, array_busy, act_set, busy, done;
  logic [1:0] h_addr;
  logic [31:0] h_wdata, h_rdata;
  logic [1:0] bank_sel [3];
  logic [2:0] fp_mode;
  logic spatial;
  int checks = 0, failures = 0;
  exec_ctrl #(.COLS(8)) dut (.*);
  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); h_en = 1; h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk); h_en = 0; h_we = 0;
  endtask
  task automatic ck(input logic c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    h_en = 0; h_we = 0; h_addr = 0; h_wdata = 0; ccu_done = 0; array_busy = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(2, 32'h3E4);
    h_addr = 2; #1;
    ck(h_rdata == 32'h3E4 && bank_sel[0] == 0 && bank_sel[1] == 1 && bank_sel[2] == 2 && fp_mode == 3'b111 && spatial, "BUSCFG");
    wr(2, 32'h1E4);
    h_addr = 2; #1;
    ck(h_rdata == 32'h1E4 && !spatial, "BUSCFG temporal mapping");
    wr(0, 32'h2);
    ck(act_set == 1'b1, "swap");
    // start: ccu_start pulses
    @(negedge clk); h_en = 1; h_we = 1; h_addr = 0; h_wdata = 1;
    @(posedge clk); #1; h_en = 0; h_we = 0;
    ck(ccu_start && busy, "start pulse");
    wr(0, 32'h2);
    ck(act_set == 1'b1, "swap ignored while running");
    repeat (5) @(negedge clk);
    ccu_done = 1; array_busy = 1;
    @(negedge clk); ccu_done = 0;
    n = 0;
    repeat (15) begin @(negedge clk); n++; ck(!done, "early done"); end
    array_busy = 0;
    while (!done && n < 100) begin @(negedge clk); n++; end
    ck(done && !busy && n == 16, "done after drain");
    h_addr = 1; #1;
    ck(h_rdata[2:0] == 3'b110, "STATUS");
    // second run, array idle throughout: done only after the fixed drain
    // time of COLS+1 cycles, so the last column receives its contexts
    @(negedge clk); h_en = 1; h_we = 1; h_addr = 0; h_wdata = 1;
    @(negedge clk); h_en = 0; h_we = 0;
    ck(busy && !done, "second start");
    repeat (3) @(negedge clk);
    ccu_done = 1;
    @(negedge clk); ccu_done = 0;
    n = 0;
    while (!done && n < 100) begin @(negedge clk); n++; end
    ck(done && n == 10, $sformatf("drain time %0d cycles, expected 10", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
