// photonic_demux - time-division demultiplexer of the output interface system.
//
// Combinational 1:N distributor: line sel carries d, all other lines carry 0. Stepping sel
// through 0..N-1 on successive DPC clocks splits one DPC channel into N lines of rate f/N.
// Interface: d, sel, o[N]. From the architecture: the reverse of the input multiplexer.
// This design's choice: binary select.
module photonic_demux #(
  parameter int unsigned N  = 64,
  parameter int unsigned SW = $clog2(N)
) (
  input  logic          d,
  input  logic [SW-1:0] sel,
  output logic [N-1:0]  o
);
  always_comb begin
    o = '0;
    for (int i = 0; i < N; i++)
      if (int'(sel) == i) o[i] = d;
  end
endmodule
