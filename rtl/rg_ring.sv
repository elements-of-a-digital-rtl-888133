// rg_ring - constant storage register of the operand block, built as a ring buffer.
//
// The photonic triggers have no hold mode, so a stored word keeps circulating. A 2:1 multiplexer
// selects the serial input d while w = 1 and the ring feedback t (the output of the last trigger
// T1) while w = 0; its output f enters trigger T_W, and the word shifts T_W -> T_W-1 -> ... -> T1.
// With w held high for W clocks a W-bit serial word is loaded; afterwards it repeats on the output
// every W clocks. The output o is taken after trigger T_W, so o follows f by one clock, as in the
// timing diagram of the register. The tap input moves the output to a later trigger, lengthening
// that delay up to W clocks (tap = 0: after T_W, tap = W-1: after T1).
// Interface: clk (clock c), w (write), d (serial data), tap, o (serial output).
// From the architecture: structure, W = 64, one-clock output delay, selectable tap. This
// design's choice: the binary-coded tap input and the reset to all zeros.
module rg_ring #(
  parameter int unsigned W = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 w,
  input  logic                 d,
  input  logic [$clog2(W)-1:0] tap,
  output logic                 o
);
  // tr[W-1] is trigger T_W, tr[0] is trigger T1.
  logic [W-1:0] tr;
  logic         f;

  assign f = w ? d : tr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tr <= '0;
    else        tr <= {f, tr[W-1:1]};
  end

  assign o = tr[($clog2(W))'(W - 1) - tap];
endmodule
