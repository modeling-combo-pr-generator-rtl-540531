// tb_stego_embed: exhaustive check of the embedding rule over all 256
// pixels and both secret bits: bits 7..2 kept, bit 1 = XOR of bits 7..4,
// bit 0 = secret bit.
module tb_stego_embed;
  timeunit 1ns; timeprecision 1ps;

  logic [7:0] cover_px, stego;
  logic secret;
  int checks = 0, failures = 0;

  stego_embed dut (.cover_px, .secret, .stego);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    for (int p = 0; p < 256; p++) begin
      for (int s = 0; s < 2; s++) begin
        cover_px = 8'(p);
        secret   = 1'(s);
        #1;
        exp = cover_px;
        exp[0] = secret;
        exp[1] = cover_px[7] ^ cover_px[6] ^ cover_px[5] ^ cover_px[4];
        checks++;
        if (stego !== exp) begin
          failures++;
          $display("FAIL cover %h secret %b: got %h expected %h", cover_px, secret, stego, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
