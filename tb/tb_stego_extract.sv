// tb_stego_extract: exhaustive check of the extraction rule over all 256
// pixels (secret = bit 0; integrity_ok when bit 1 equals the parity of bits
// 7..4), plus a count of how many of the 256 values pass (half must).
module tb_stego_extract;
  timeunit 1ns; timeprecision 1ps;

  logic [7:0] stego;
  logic secret, ok;
  int checks = 0, failures = 0;

  stego_extract dut (.stego, .secret, .integrity_ok(ok));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, passing = 0;
    for (int p = 0; p < 256; p++) begin
      stego = 8'(p);
      #1;
      ones = 0;
      for (int b = 4; b < 8; b++) ones += p[b];
      checks++;
      if (secret !== stego[0]) begin failures++; $display("FAIL secret %h", stego); end
      checks++;
      if (ok !== ((ones % 2) == p[1])) begin failures++; $display("FAIL integrity %h -> %b", stego, ok); end
      if (ok) passing++;
    end
    checks++;
    if (passing != 128) begin failures++; $display("FAIL %0d passing values", passing); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
