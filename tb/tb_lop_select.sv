// tb_lop_select: checks the round-robin output register for three and two
// inputs. Random values are offered, opclk edges are applied one at a time,
// and each edge must store the input whose turn it is (0, 1, 2, 0, ...),
// starting with input 0 after reset; nothing may change between edges.
module tb_lop_select;
  timeunit 1ns; timeprecision 1ps;

  logic opclk = 1'b0;
  logic reset = 1'b0;
  logic [2:0][7:0] v3;
  logic [1:0][7:0] v2;
  logic [7:0] r3, r2;
  logic ok3, ok2;
  int checks = 0, failures = 0;

  lop_select #(.N(3), .W(8)) dut3 (.opclk, .reset, .lfsr_val(v3), .lopresult(r3), .lop_valid(ok3));
  lop_select #(.N(2), .W(8)) dut2 (.opclk, .reset, .lfsr_val(v2), .lopresult(r2), .lop_valid(ok2));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e3, e2;
    v3 = '0; v2 = '0;
    #1 reset = 1'b1;
    #5 reset = 1'b0;
    #5;
    checks++;
    if (ok3 || ok2) begin failures++; $display("FAIL valid before first edge"); end
    for (int k = 0; k < 300; k++) begin
      v3 = {8'($urandom), 8'($urandom), 8'($urandom)};
      v2 = {8'($urandom), 8'($urandom)};
      e3 = v3[k % 3];
      e2 = v2[k % 2];
      #5 opclk = 1'b1;
      #5 opclk = 1'b0;
      check("N=3", r3, e3);
      check("N=2", r2, e2);
      checks++;
      if (!ok3 || !ok2) begin failures++; $display("FAIL valid low"); end
      // inputs change with opclk low: outputs must hold
      v3 = ~v3; v2 = ~v2;
      #3;
      check("hold N=3", r3, e3);
      check("hold N=2", r2, e2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
