// tb_shared_div: streams normalised mantissa pairs into the pipelined divider
// one per cycle and checks each quotient floor(a*2^18/b) LAT-1 cycles later.
module tb_shared_div;
  localparam int LAT = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req, qv;
  logic [15:0] a, b;
  logic [18:0] q;
  logic [18:0] expq [$];
  int checks = 0, failures = 0;
  shared_div #(.LAT(LAT)) dut (.clk, .rst_n, .req, .a, .b, .q_valid(qv), .q);
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [18:0] pipe [LAT];
    logic        pv   [LAT];
    for (int i = 0; i < LAT; i++) begin pipe[i] = '0; pv[i] = 0; end
    req = 0; a = 16'h8000; b = 16'h8000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      // apply request i; expected result appears LAT-1 edges later
      req = 1;
      a = {1'b1, 15'($urandom)}; b = {1'b1, 15'($urandom)};
      if (i == 0) begin a = 16'hFFFF; b = 16'h8000; end
      if (i == 1) begin a = 16'h8000; b = 16'hFFFF; end
      for (int s = LAT-1; s > 0; s--) begin pipe[s] = pipe[s-1]; pv[s] = pv[s-1]; end
      pipe[0] = 19'((64'(a) << 18) / 64'(b)); pv[0] = 1;
      #1;
      if (pv[LAT-1]) begin
        checks++;
        if (!qv || q !== pipe[LAT-1]) begin failures++; $display("FAIL div %h, expected %h", q, pipe[LAT-1]); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
