// tb_exp_sat: checks the exponent saturation module over the whole signed
// range around 0 and 255.
module tb_exp_sat;
  logic signed [15:0] e_in;
  logic [7:0] e_out;
  logic ovf, unf;
  int checks = 0, failures = 0;
  exp_sat dut (.e_in, .e_out, .ovf, .unf);
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = -300; v <= 600; v++) begin
      int x;
      e_in = 16'(v); #1;
      x = (v >= 255) ? 255 : (v <= 0) ? 0 : v;
      checks++;
      if (int'(e_out) != x || ovf != (v >= 255) || unf != (v <= 0)) begin
        failures++; $display("FAIL sat %0d -> %0d %b %b", v, e_out, ovf, unf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
