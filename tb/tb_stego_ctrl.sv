// tb_stego_ctrl: checks the embed / extract controller with an array model
// of the stego RAM in the testbench.
// A random cover image is loaded through the host port; then random embed
// and extract operations at random addresses are started. Checked: done
// exactly three cycles after start, busy while working, the pixel written
// by each embed (secret in bit 0, parity of bits 7..4 in bit 1, bits 7..2
// kept), the bit and integrity result of each extract, detection of a
// pixel tampered through the host port, and host writes ignored while busy.
module tb_stego_ctrl;
  import ssst_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  logic start, secret_bit, busy, done, rd_bit, integrity_ok;
  stego_op_e op;
  logic [7:0] prg_addr, addr_used, host_addr, ram_addr;
  logic host_we, ram_we;
  pixel_t host_wdata, host_rdata, ram_wdata, ram_rdata;

  stego_ctrl dut (.clk, .reset, .start, .op, .secret_bit, .prg_addr, .busy, .done,
                  .addr_used, .rd_bit, .integrity_ok, .host_we, .host_addr, .host_wdata,
                  .host_rdata, .ram_we, .ram_addr, .ram_wdata, .ram_rdata);

  // RAM model: synchronous read-first single port.
  logic [7:0] mem [256];
  always @(posedge clk) begin
    if (ram_we) mem[ram_addr] <= ram_wdata;
    ram_rdata <= mem[ram_addr];
  end

  int checks = 0, failures = 0;
  logic [7:0] image [256];   // what the pixels should hold

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic logic parity4(logic [7:0] p);
    return p[7] ^ p[6] ^ p[5] ^ p[4];
  endfunction

  // Start one operation and wait for done; returns the cycles to done.
  task automatic run_op(stego_op_e o, logic b, logic [7:0] a, output int lat);
    @(negedge clk);
    start = 1'b1; op = o; secret_bit = b; prg_addr = a;
    @(negedge clk);
    start = 1'b0; prg_addr = ~a;   // address must have been captured
    lat = 1;
    while (!done) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low while working"); end
      @(negedge clk);
      lat++;
      if (lat > 10) break;
    end
    check("addr_used", addr_used, a);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    logic [7:0] a;
    logic b;
    start = 0; op = OP_EMBED; secret_bit = 0; prg_addr = 0;
    host_we = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    // load a cover image through the host port
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = 8'(i); host_wdata = 8'($urandom);
      image[i] = host_wdata;
    end
    @(negedge clk) host_we = 1'b0;
    for (int k = 0; k < 400; k++) begin
      a = 8'($urandom);
      b = 1'($urandom);
      if ($urandom % 2) begin
        run_op(OP_EMBED, b, a, lat);
        check("embed latency", 8'(lat), 8'd3);
        image[a] = {image[a][7:2], parity4(image[a]), b};
        @(negedge clk);
        check("embedded pixel", mem[a], image[a]);
      end else begin
        run_op(OP_EXTRACT, b, a, lat);
        check("extract latency", 8'(lat), 8'd3);
        check("extract bit", 8'(rd_bit), 8'(image[a][0]));
        check("extract integrity", 8'(integrity_ok), 8'(image[a][1] == parity4(image[a])));
        check("extract leaves pixel", mem[a], image[a]);
      end
    end
    // embed, tamper with the upper bits, extract: the check must fail
    a = 8'h5A;
    run_op(OP_EMBED, 1'b1, a, lat);
    @(negedge clk);
    host_we = 1'b1; host_addr = a; host_wdata = mem[a] ^ 8'h40;
    @(negedge clk) host_we = 1'b0;
    run_op(OP_EXTRACT, 1'b0, a, lat);
    check("tamper detected", 8'(integrity_ok), 8'd0);
    // host write while busy is ignored
    image[8'h33] = mem[8'h33];
    @(negedge clk);
    start = 1'b1; op = OP_EXTRACT; prg_addr = 8'h10;
    @(negedge clk);
    start = 1'b0; host_we = 1'b1; host_addr = 8'h33; host_wdata = ~image[8'h33];
    @(negedge clk);
    host_we = 1'b0;
    repeat (3) @(negedge clk);
    check("host write while busy ignored", mem[8'h33], image[8'h33]);
    // host read path
    @(negedge clk) host_addr = 8'h33;
    @(negedge clk);
    check("host read", host_rdata, image[8'h33]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
