// stego_ctrl: embeds or extracts one secret bit at a pseudo-random pixel.
//
// An operation starts with a one-cycle start pulse while busy is low. The
// controller then captures the pixel address offered by the PR generator
// (prg_addr), the operation and the secret bit, and works on the stego RAM
// in three cycles:
//   IDLE  --start-->  READ (RAM read at the captured address)
//   READ  ------->    APPLY: EMBED writes back the pixel with the secret bit
//                     in bit 0 and the integrity bit in bit 1 (stego_embed);
//                     EXTRACT returns bit 0 and the integrity check result
//                     (stego_extract). done pulses for one cycle.
//   APPLY ------->    IDLE
// While idle, a host port reads and writes the RAM directly (loading a cover
// image, reading back a stego image); host_rdata is valid one cycle after
// the read address. Host accesses made while busy are ignored. The
// sequencing and the host port are this design's choice: the source only
// states what is written into the pixel and why.
//
// Ports: clk, reset (asynchronous, active high); start, op, secret_bit,
// prg_addr; busy, done, addr_used, rd_bit, integrity_ok; host_we, host_addr,
// host_wdata, host_rdata; RAM port ram_we, ram_addr, ram_wdata, ram_rdata.
// reset also disables the two assertions at the end, so lint tools see it
// used both as an asynchronous reset and as a clocked condition.
module stego_ctrl
  import ssst_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          reset,
  // operation request
  input  logic          start,
  input  stego_op_e     op,
  input  logic          secret_bit,
  input  logic [AW-1:0] prg_addr,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] addr_used,
  output logic          rd_bit,
  output logic          integrity_ok,
  // host access (honoured while idle)
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  pixel_t        host_wdata,
  output pixel_t        host_rdata,
  // stego RAM
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  output pixel_t        ram_wdata,
  input  pixel_t        ram_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_APPLY} state_e;

  state_e    state;
  stego_op_e op_q;
  logic      bit_q;
  pixel_t    embedded;
  logic      ext_bit, ext_ok;

  stego_embed   u_embed   (.cover_px(ram_rdata), .secret(bit_q), .stego(embedded));
  stego_extract u_extract (.stego(ram_rdata), .secret(ext_bit), .integrity_ok(ext_ok));

  assign busy       = (state != S_IDLE);
  assign host_rdata = ram_rdata;

  always_comb begin
    ram_we    = 1'b0;
    ram_addr  = host_addr;
    ram_wdata = host_wdata;
    unique case (state)
      S_IDLE:  ram_we = host_we;
      S_READ:  ram_addr = addr_used;
      S_APPLY: begin
        ram_addr  = addr_used;
        ram_wdata = embedded;
        ram_we    = (op_q == OP_EMBED);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state        <= S_IDLE;
      op_q         <= OP_EMBED;
      bit_q        <= 1'b0;
      addr_used    <= '0;
      done         <= 1'b0;
      rd_bit       <= 1'b0;
      integrity_ok <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          addr_used <= prg_addr;
          op_q      <= op;
          bit_q     <= secret_bit;
          state     <= S_READ;
        end
        S_READ: state <= S_APPLY;
        S_APPLY: begin
          if (op_q == OP_EXTRACT) begin
            rd_bit       <= ext_bit;
            integrity_ok <= ext_ok;
          end
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // done is a single-cycle pulse and only follows the APPLY state.
  a_done_pulse: assert property (@(posedge clk) disable iff (reset) done |=> !done);
  a_done_after_apply: assert property (@(posedge clk) disable iff (reset)
                                       (state == S_APPLY) |=> done);
endmodule
