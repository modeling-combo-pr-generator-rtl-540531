// stego_ram: single-port block RAM holding the cover / stego image.
//
// DEPTH words of DW bits; with the default 8-bit address every value of the
// 8-bit PR generators names one pixel. Writes happen on the rising clock
// edge when we is high; reads are synchronous: rdata shows the word at the
// address of the previous cycle (read-first: a write returns the old word).
// No reset of the contents, as in an FPGA block RAM.
//
// Ports: clk, we, addr, wdata, rdata.
module stego_ram #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
