// iwr - external memory access interface IWR of the operand block.
//
// Delays a serial stream by more than the syncf depth by keeping it in external memory, used as
// a circular buffer of 2^MAW one-bit words. While w = 1 every clock writes the input bit at the
// write pointer and advances the pointer. The input already comes out of syncf at its full depth
// PRE, so the memory adds only k = a - PRE clocks: the bit read back at address
// (write pointer - k) was written k clocks earlier, and the total delay of the leading stream is
// a. While r = 1 that bit drives o; otherwise o is 0.
// Interface: clk (c), d, w (wi), a (ai, total delay), r (ri); memory port mem_we / mem_waddr /
// mem_wdata and mem_raddr / mem_rdata. The memory port assumes the read data of an address comes
// back in the same clock and that a read of an address sees writes of earlier clocks only.
// From the architecture: the block's role and its d, w, a, r, o and i/o pins. This design's
// choice: the circular-buffer scheme, the pre-delay offset, the memory port timing and MAW = 16.
module iwr #(
  parameter int unsigned QW     = 17,
  parameter int unsigned MAW = 16,
  parameter int unsigned PRE = 1000
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           d,
  input  logic           w,
  input  logic [QW-1:0]  a,
  input  logic           r,
  output logic           o,
  output logic           mem_we,
  output logic [MAW-1:0] mem_waddr,
  output logic           mem_wdata,
  output logic [MAW-1:0] mem_raddr,
  input  logic           mem_rdata
);
  logic [MAW-1:0] wptr;
  logic [MAW-1:0] k;  // memory part of the delay, modulo the buffer size

  assign k = (a > QW'(PRE)) ? MAW'(a - QW'(PRE)) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  wptr <= '0;
    else if (w)  wptr <= wptr + 1'b1;
  end

  assign mem_we    = w;
  assign mem_waddr = wptr;
  assign mem_wdata = d;
  assign mem_raddr = wptr - MAW'(k);
  assign o         = r & mem_rdata;
endmodule
