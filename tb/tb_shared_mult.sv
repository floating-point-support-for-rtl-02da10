// tb_shared_mult: streams one request per cycle into the shared multiplier
// and checks every product one cycle later (two-stage pipeline).
module tb_shared_mult;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req, pv;
  logic [15:0] a, b;
  logic [31:0] p, exp_q;
  logic exp_v;
  int checks = 0, failures = 0;
  shared_mult dut (.clk, .rst_n, .req, .a, .b, .p_valid(pv), .p);
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    req = 0; a = 0; b = 0; exp_v = 0; exp_q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (!pv || p !== exp_q) begin failures++; $display("FAIL mult %h, expected %h", p, exp_q); end
      end
      req = (i % 7 != 3);
      a = (i < 4) ? 16'hFFFF : 16'($urandom);
      b = (i < 4) ? 16'hFFFF : 16'($urandom);
      exp_v = req; exp_q = 32'(a) * 32'(b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
