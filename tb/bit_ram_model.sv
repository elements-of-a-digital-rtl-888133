// bit_ram_model - behavioural model of the external memory seen by an IWR port.
// One-bit words, 2^AW of them, cleared at time zero. A write happens on the clock edge; a read
// returns the word of an address in the same clock (combinational), so a read sees only the
// writes of earlier clocks. This stands in for the RAM chips, the static switch and the
// interface system behind an IWR; it is not synthesizable design.
module bit_ram_model #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wdata,
  input  logic [AW-1:0] raddr,
  output logic          rdata
);
  logic mem [2**AW];
  initial for (int i = 0; i < 2**AW; i++) mem[i] = 1'b0;
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
