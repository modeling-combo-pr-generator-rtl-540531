// tb_opclk_xor: checks the clock combiner for two and three inputs against
// a count of the high inputs (odd count -> opclk high), over all input
// combinations and a run of random ones.
module tb_opclk_xor;
  timeunit 1ns; timeprecision 1ps;

  logic [2:0] in3;
  logic [1:0] in2;
  logic o3, o2;
  int checks = 0, failures = 0;

  opclk_xor #(.N(3)) dut3 (.clk_in(in3), .opclk(o3));
  opclk_xor #(.N(2)) dut2 (.clk_in(in2), .opclk(o2));

  function automatic logic odd_ones(logic [2:0] v, int n);
    int c = 0;
    for (int i = 0; i < n; i++) if (v[i]) c++;
    return (c % 2) == 1;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      in3 = (k < 8) ? 3'(k) : 3'($urandom);
      in2 = (k < 4) ? 2'(k) : 2'($urandom);
      #1;
      checks++;
      if (o3 !== odd_ones(in3, 3)) begin failures++; $display("FAIL N=3 in=%b out=%b", in3, o3); end
      checks++;
      if (o2 !== odd_ones({1'b0, in2}, 2)) begin failures++; $display("FAIL N=2 in=%b out=%b", in2, o2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
