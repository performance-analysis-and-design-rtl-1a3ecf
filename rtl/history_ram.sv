// history_ram: sign-bit and delta-1 storage of the FIR ADM filter.
//
// One word per stored sample and channel: the increment sign b(k-1) and the
// one-bit direction of the step-size level (adm_pkg::hist_t). Channel c uses
// the DEPTH_PER_CH words from c * DEPTH_PER_CH up, written in a ring, so the
// channels' words are interleaved in one RAM as in the multi-channel version
// of the filter. The source design keeps these bits in shift registers or a
// RAM; a simple dual-port RAM is used here.
//
// Interface: one synchronous write port and one read port with a registered
// output (read data appears the cycle after raddr is presented). There is no
// reset; the processor never uses a word before it was written.
module history_ram
  import adm_pkg::*;
#(
  parameter int unsigned DEPTH = 60,
  localparam int unsigned A_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           we,
  input  logic [A_W-1:0] waddr,
  input  hist_t          wdata,
  input  logic           re,
  input  logic [A_W-1:0] raddr,
  output hist_t          rdata
);

  hist_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
