// tb_lod: checks the leading-one detector against a reference scan on all
// single-bit values, zero and random values.
module tb_lod;
  logic [19:0] din;
  logic [4:0]  pos;
  logic        zero;
  int checks = 0, failures = 0;
  lod #(.W(20)) dut (.din, .pos, .zero);

  task automatic chk();
    int ref_pos = 0;
    #1;
    for (int i = 0; i < 20; i++) if (din[i]) ref_pos = i;
    checks++;
    if (zero !== (din == 0) || (din != 0 && int'(pos) != ref_pos)) begin
      failures++;
      $display("FAIL lod %h -> pos %0d zero %b, expected %0d", din, pos, zero, ref_pos);
    end
  endtask

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    din = '0; chk();
    for (int i = 0; i < 20; i++) begin din = 20'(1) << i; chk(); end
    for (int i = 0; i < 500; i++) begin din = 20'($urandom) >> ($urandom % 20); chk(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
