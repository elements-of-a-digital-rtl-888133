// syncf - operand stream synchronizer: a tapped shift register delaying a serial stream.
//
// N triggers T1..TN are connected in series; a multiplexer with N+1 inputs picks D1 = d
// (no delay) or D(k+1) = output of trigger Tk (delay of k clocks). The select input a therefore
// equals the delay in clocks, 0 <= a <= N, matching the timing diagram where a = 3, 5 and 6 shift
// the stream by 3, 5 and 6 clocks. Values of a above N select the last trigger.
// Interface: clk (c), w (write enable from the control block: while 0 the chain is fed zeros,
// because the triggers cannot hold data), d, a, o. The output is combinational from the chain.
// From the architecture: structure, N = 10^3, a = delay. This design's choice: the meaning of w
// and the clamp on a.
module syncf #(
  parameter int unsigned N  = 1000,
  parameter int unsigned AW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          w,
  input  logic          d,
  input  logic [AW-1:0] a,
  output logic          o
);
  // chain[k] is the output of trigger Tk; the multiplexer input D(k+1) is chain[k], D1 is din.
  logic [N:1] chain;
  logic       din;

  assign din = w & d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else        chain <= {chain[N-1:1], din};
  end

  always_comb begin
    if (a == '0)         o = din;
    else if (a > AW'(N)) o = chain[N];
    else                 o = chain[a];
  end
endmodule
