// deserializer - serial-to-parallel converter of the output interface system (DPC -> RAM).
//
// The reverse of the serializer: each shift pulse takes din in at the top and moves the word
// down one place, so after WW shifts the first bit received is bit 0 (least significant first).
// Interface: shift, din in; word out (registered).
// From the architecture: the output system repeats the input one in reverse order. This design's
// choice: LSB first, enable timing.
module deserializer #(
  parameter int unsigned WW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  logic          din,
  output logic [WW-1:0] word
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     word <= '0;
    else if (shift) word <= {din, word[WW-1:1]};
  end
endmodule
