// tb_ssst_top: end-to-end test of the whole design at its default sizes.
//
// Clocks: 50 MHz system clock and the behavioural PLL model's 52.38, 73.33
// and 22.9 MHz clocks. Steps:
//  1. After reset, the four generator outputs are compared with reference
//     models for 40 us: Case 1 must skip values, Cases 2 and 3 must repeat
//     values, Case 4 must repeat its sequence after 510 cycles.
//  2. A random cover image is loaded through the host port.
//  3. Reset restarts the generators; a 96-bit message is embedded, one bit
//     every 8 cycles, at the addresses given by Case 4 (first half) and
//     Case 1 (second half); each address used must equal the generator
//     output at the start cycle.
//  4. Reset again; the same schedule extracts the bits, which must equal
//     the last bit embedded at each address, with every integrity check
//     passing; every touched pixel must differ from the cover only in bits
//     1..0.
//  5. One stego pixel is altered through the host port; extracting it must
//     fail the integrity check.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_ssst_top;
  import ssst_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int MSG_BITS = 96;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #10 clk = ~clk;

  logic p_clk, q_clk, r_clk;
  pll_model u_pll (.p_clk, .q_clk, .r_clk);

  logic [7:0] c1_lop, c2_lop, c3_lop, c4_lop, stego_addr, host_addr;
  logic c1_valid, c2_valid, c2_opclk, c3_valid, c3_opclk, c4_valid;
  logic addr_sel, stego_start, secret_bit, stego_busy, stego_done, rd_bit, integrity_ok, host_we;
  stego_op_e stego_op;
  pixel_t host_wdata, host_rdata;

  ssst_top dut (.*);

  // reference models of Cases 1-3
  logic [7:0] e1, e2, e3;
  logic ev1, ev2, ev3;
  int ns1, nr1, nk1, ns2, nr2, nk2, ns3, nr3, nk3;
  combo_ref #(.N(3)) ref1 (.clk_in({clk, clk, clk}), .reset, .exp_lop(e1), .exp_valid(ev1),
                           .n_select(ns1), .n_repeat(nr1), .n_skip(nk1));
  combo_ref #(.N(3)) ref2 (.clk_in({r_clk, q_clk, p_clk}), .reset, .exp_lop(e2), .exp_valid(ev2),
                           .n_select(ns2), .n_repeat(nr2), .n_skip(nk2));
  combo_ref #(.N(2), .FB_MASKS({8'hB8, 8'h8E}), .SEEDS({8'h0F, 8'hF0}))
    ref3 (.clk_in({q_clk, p_clk}), .reset, .exp_lop(e3), .exp_valid(ev3),
          .n_select(ns3), .n_repeat(nr3), .n_skip(nk3));

  int checks = 0, failures = 0;
  int s_nk1, s_nr2, s_nr3;
  int n_case4_period = 0, n_embed = 0, n_extract = 0, n_tamper = 0, n_sel_c1 = 0, n_sel_c4 = 0;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h at %t", what, got, exp, $time); end
  endtask

  always @(e1 or c1_lop) if (!reset) begin #1ps; check("case1", c1_lop, e1); end
  always @(e2 or c2_lop) if (!reset) begin #1ps; check("case2", c2_lop, e2); end
  always @(e3 or c3_lop) if (!reset) begin #1ps; check("case3", c3_lop, e3); end

  // Case 4 reference: own LFSR equations, XOR, reversed bit order, 1 cycle late.
  logic [7:0] m4p, m4q, e4;
  bit m4half;
  always @(posedge clk or posedge reset) begin
    if (reset) begin
      m4p <= 8'hF0; m4q <= 8'h0F; m4half <= 1'b0; e4 <= 8'h00;
    end else begin
      e4 <= {<<{m4p ^ m4q}};
      m4half <= ~m4half;
      if (m4half) begin
        m4p <= {m4p[0], m4p[7:5], m4p[4:1] ^ ({4{m4p[0]}} & 4'b1110)};
        m4q <= {m4q[0], m4q[7], m4q[6:4] ^ {3{m4q[0]}}, m4q[3:1]};
      end
    end
  end
  always @(negedge clk) if (!reset && c4_valid) check("case4", c4_lop, e4);

  function automatic logic parity4(logic [7:0] p);
    return p[7] ^ p[6] ^ p[5] ^ p[4];
  endfunction

  logic [7:0] cover_img [256];
  logic [7:0] msg_addr [MSG_BITS];
  logic       msg_bit  [MSG_BITS];
  logic       last_bit [256];

  task automatic pulse_reset();
    @(negedge clk) reset = 1'b1;
    @(negedge clk);
    @(negedge clk) reset = 1'b0;
  endtask

  // Runs one operation starting at the next negedge; returns the address used.
  task automatic run_op(stego_op_e o, logic sel, logic b, output logic [7:0] a);
    logic [7:0] offered;
    @(negedge clk);
    addr_sel = sel; stego_op = o; secret_bit = b; stego_start = 1'b1;
    offered = sel ? c4_lop : c1_lop;
    @(negedge clk);
    stego_start = 1'b0;
    check("address taken from generator", stego_addr, offered);
    a = stego_addr;
    repeat (2) @(negedge clk);
    checks++;
    if (!stego_done) begin failures++; $display("FAIL done not 3 cycles after start"); end
    if (sel) n_sel_c4++; else n_sel_c1++;
    repeat (4) @(negedge clk);   // 8 cycles per bit
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] first4 [510];
    logic [7:0] a;
    addr_sel = 0; stego_start = 0; stego_op = OP_EMBED; secret_bit = 0;
    host_we = 0; host_addr = 0; host_wdata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // 1. generators free-running
    for (int c = 0; c < 2000; c++) begin
      @(posedge clk); #2;
      if (c < 510) first4[c] = c4_lop;
      else if (c < 1020) begin
        check("case4 period", c4_lop, first4[c - 510]);
        if (c4_lop == first4[c - 510]) n_case4_period++;
      end
    end
    s_nk1 = nk1; s_nr2 = nr2; s_nr3 = nr3;
    $display("case1 skips %0d, case2 repeats %0d, case3 repeats %0d, case4 period matches %0d",
             nk1, nr2, nr3, n_case4_period);

    // 2. load cover image
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = 8'(i); host_wdata = 8'($urandom);
      cover_img[i] = host_wdata;
    end
    @(negedge clk) host_we = 1'b0;

    // 3. embed
    pulse_reset();
    for (int k = 0; k < MSG_BITS; k++) begin
      msg_bit[k] = 1'($urandom);
      run_op(OP_EMBED, (k < MSG_BITS / 2), msg_bit[k], a);
      msg_addr[k] = a;
      last_bit[a] = msg_bit[k];
      n_embed++;
    end

    // 4. extract with the same schedule
    pulse_reset();
    for (int k = 0; k < MSG_BITS; k++) begin
      run_op(OP_EXTRACT, (k < MSG_BITS / 2), 1'b0, a);
      check("replayed address", a, msg_addr[k]);
      check("extracted bit", 8'(rd_bit), 8'(last_bit[msg_addr[k]]));
      check("integrity ok", 8'(integrity_ok), 8'd1);
      n_extract++;
    end
    // pixels changed only in bits 1..0
    for (int k = 0; k < MSG_BITS; k++) begin
      @(negedge clk) host_addr = msg_addr[k];
      @(negedge clk);
      check("stego pixel upper bits", host_rdata[7:2], cover_img[msg_addr[k]][7:2]);
      check("stego pixel bit 1", 8'(host_rdata[1]), 8'(parity4(cover_img[msg_addr[k]])));
    end

    // 5. tamper with the first embedded pixel and extract it again
    @(negedge clk) host_addr = msg_addr[0];
    @(negedge clk);
    host_we = 1'b1; host_wdata = host_rdata ^ 8'h10;
    @(negedge clk) host_we = 1'b0;
    pulse_reset();
    run_op(OP_EXTRACT, 1'b1, 1'b0, a);
    check("tampered address", a, msg_addr[0]);
    check("tamper detected", 8'(integrity_ok), 8'd0);
    if (!integrity_ok) n_tamper++;

    // mechanism coverage
    checks++; if (s_nk1 == 0)          begin failures++; $display("FAIL case1 never skipped"); end
    checks++; if (s_nr2 == 0)          begin failures++; $display("FAIL case2 never repeated"); end
    checks++; if (s_nr3 == 0)          begin failures++; $display("FAIL case3 never repeated"); end
    checks++; if (n_case4_period == 0) begin failures++; $display("FAIL case4 period never seen"); end
    checks++; if (n_sel_c1 == 0 || n_sel_c4 == 0) begin failures++; $display("FAIL an address source unused"); end
    checks++; if (n_embed == 0 || n_extract == 0) begin failures++; $display("FAIL no embed/extract"); end
    checks++; if (n_tamper == 0)       begin failures++; $display("FAIL tamper never detected"); end
    $display("mechanisms: case1 skips %0d, case2 repeats %0d, case3 repeats %0d, case4 period %0d, embeds %0d, extracts %0d, addr case1 %0d / case4 %0d, tamper %0d",
             s_nk1, s_nr2, s_nr3, n_case4_period, n_embed, n_extract, n_sel_c1, n_sel_c4, n_tamper);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
