// emis_out - external memory interface system, DPC -> RAM direction.
//
// The input system in reverse order: a 1:LANES time-division demultiplexer hands successive bits
// of the DPC channel to LANES deserializers, one per RAM channel, so that bit p of a frame lands in
// bit p / LANES of the word for lane p mod LANES. A frame starts on the first clock of a stream
// (marker rising) and holds LANES * WW bits; when it is complete the words appear on words with a
// one-clock valid pulse, two clocks after the frame's last bit. A stream that ends inside a
// frame leaves that frame unwritten.
// Interface: in (dpc_pkg::stream_t); words[LANES][WW], valid out.
// From the architecture: the output system mirrors the input one. This design's choice: frame
// alignment to the marker, the bit order and the valid pulse.
module emis_out
  import dpc_pkg::*;
#(
  parameter int unsigned LANES = 64,
  parameter int unsigned WW    = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  stream_t                   in,
  output logic [LANES-1:0][WW-1:0]  words,
  output logic                      valid
);
  localparam int unsigned LW = $clog2(LANES);
  localparam int unsigned BW = $clog2(WW);

  logic [LW-1:0]                 lane;
  logic [BW-1:0]                 bitn;
  logic                          done;
  logic [LANES-1:0]              dm;
  logic [LANES-1:0][WW-1:0]      acc;
  logic                          last;

  // lane / bitn: position of the current bit in its frame; both rest at 0 between streams.
  assign last = in.m && (lane == LW'(LANES - 1)) && (bitn == BW'(WW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane   <= '0;
      bitn   <= '0;
      done   <= 1'b0;
      valid  <= 1'b0;
      words  <= '0;
    end else begin
      done  <= last;
      valid <= done;
      if (done) words <= acc;
      if (!in.m) begin
        lane <= '0;
        bitn <= '0;
      end else if (lane == LW'(LANES - 1)) begin
        lane <= '0;
        bitn <= (bitn == BW'(WW - 1)) ? '0 : bitn + 1'b1;
      end else begin
        lane <= lane + 1'b1;
      end
    end
  end

  photonic_demux #(.N(LANES)) u_dmx (.d(in.d), .sel(lane), .o(dm));

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    deserializer #(.WW(WW)) u_ds (
      .clk, .rst_n, .shift(in.m && lane == LW'(i)), .din(dm[i]), .word(acc[i])
    );
  end
endmodule
