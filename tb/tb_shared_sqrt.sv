// tb_shared_sqrt: streams radicands into the pipelined square-root unit one
// per cycle and checks each root floor(sqrt(rad)) LAT-1 cycles later, with the
// exact-root property root^2 <= rad < (root+1)^2.
module tb_shared_sqrt;
  localparam int LAT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req, rv;
  logic [37:0] rad;
  logic [18:0] root;
  int checks = 0, failures = 0;
  shared_sqrt #(.LAT(LAT)) dut (.clk, .rst_n, .req, .rad, .root_valid(rv), .root);
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [37:0] pipe [LAT];
    logic        pv   [LAT];
    for (int i = 0; i < LAT; i++) begin pipe[i] = '0; pv[i] = 0; end
    req = 0; rad = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      req = 1;
      rad = {6'($urandom), 32'($urandom)};
      if (i == 0) rad = 38'd1 << 36;        // root 2^18
      if (i == 1) rad = '1;
      for (int s = LAT-1; s > 0; s--) begin pipe[s] = pipe[s-1]; pv[s] = pv[s-1]; end
      pipe[0] = rad; pv[0] = 1;
      #1;
      if (pv[LAT-1]) begin
        logic [63:0] r0, r1;
        r0 = 64'(root) * 64'(root);
        r1 = (64'(root) + 1) * (64'(root) + 1);
        checks++;
        if (!rv || r0 > 64'(pipe[LAT-1]) || r1 <= 64'(pipe[LAT-1])) begin
          failures++; $display("FAIL sqrt(%h) = %h", pipe[LAT-1], root);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
