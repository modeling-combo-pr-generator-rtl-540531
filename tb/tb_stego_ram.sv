// tb_stego_ram: fills the 256 x 8 RAM, then runs random reads and writes
// against an array model; checks the one-cycle read latency and that a
// write returns the previous word (read-first).
module tb_stego_ram;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  stego_ram dut (.clk, .we, .addr, .wdata, .rdata);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    we = 1'b0; addr = '0; wdata = '0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1'b1; addr = 8'(a); wdata = 8'($urandom);
      model[a] = wdata;
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 8'($urandom); wdata = 8'($urandom);
      exp = model[addr];
      if (we) model[addr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== exp) begin failures++; $display("FAIL addr %h got %h expected %h", addr, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
