// serializer - parallel-to-serial converter S of the external memory interface system.
//
// Takes one WW-bit word from a RAM channel (load) and hands it out one bit at a time, least
// significant bit first: q shows the current bit, and each shift pulse moves to the next one.
// In the architecture a 16-bit channel at 1 GHz becomes one 16 GHz line; here both rates are
// expressed as enables of the single DPC clock.
// Interface: load, word in; shift; q out (registered state, combinational output).
// From the architecture: 16:1 ratio (WW = 16). This design's choice: LSB first, enable timing.
module serializer #(
  parameter int unsigned WW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [WW-1:0] word,
  input  logic          shift,
  output logic          q
);
  logic [WW-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= word;
    else if (shift) sr <= {1'b0, sr[WW-1:1]};
  end

  assign q = sr[0];
endmodule
