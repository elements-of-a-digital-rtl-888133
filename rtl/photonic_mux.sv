// photonic_mux - time-division multiplexer MX that merges N slow lines into one DPC channel.
//
// Combinational N:1 selector: o = d[sel]. Stepping sel through 0..N-1 on successive DPC clocks
// interleaves N lines of rate f/N into one line of rate f (64 lines at 16 GHz give about 1 THz).
// Interface: d[N], sel, o. From the architecture: the multiplexer and N = 64. This design's
// choice: a plain binary select driven by the interface system's lane counter.
module photonic_mux #(
  parameter int unsigned N  = 64,
  parameter int unsigned SW = $clog2(N)
) (
  input  logic [N-1:0]  d,
  input  logic [SW-1:0] sel,
  output logic          o
);
  always_comb begin
    o = 1'b0;
    for (int i = 0; i < N; i++)
      if (int'(sel) == i) o = d[i];
  end
endmodule
