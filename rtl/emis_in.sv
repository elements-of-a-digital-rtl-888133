// emis_in - external memory interface system, RAM -> DPC direction.
//
// Turns LANES parallel RAM channels of WW bits into one bit-serial DPC channel. Each lane has a
// serializer S (WW:1); the time-division multiplexer MX visits the lanes in turn, one per DPC
// clock, and each serializer moves to its next bit right after MX has taken the current one.
// A frame is LANES * WW clocks (1024 by default): bit p of a frame is bit p / LANES of the word
// of lane p mod LANES. So the word from RAM_i supplies every LANES-th bit of the stream; the host
// must place its data accordingly. One frame of words is taken on the clock on which take = 1
// (the last clock of the previous frame); valid taken with them becomes the stream marker for
// the whole frame. The optical converters between serializers and MX only change the physical
// medium and are not part of this logic.
// Interface: words[LANES][WW], valid in; take out; out (dpc_pkg::stream_t) out, registered.
// Timing: frame bit p leaves on out one clock after the MX selects it.
// From the architecture: 64 channels of 16 bits at 1 GHz, serializers, converters and a 64:1
// multiplexer giving about 1 THz. This design's choice: the bit order, the frame handshake and
// the marker.
module emis_in
  import dpc_pkg::*;
#(
  parameter int unsigned LANES = 64,
  parameter int unsigned WW    = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [LANES-1:0][WW-1:0]  words,
  input  logic                      valid,
  output logic                      take,
  output stream_t                   out
);
  localparam int unsigned LW = $clog2(LANES);
  localparam int unsigned BW = $clog2(WW);

  logic [LW-1:0]    lane;
  logic [BW-1:0]    bitn;
  logic [LANES-1:0] q;
  logic             frame_valid, mx_o;

  assign take = (lane == LW'(LANES - 1)) && (bitn == BW'(WW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane        <= LW'(LANES - 1);
      bitn        <= BW'(WW - 1);
      frame_valid <= 1'b0;
      out         <= '0;
    end else begin
      if (lane == LW'(LANES - 1)) begin
        lane <= '0;
        bitn <= (bitn == BW'(WW - 1)) ? '0 : bitn + 1'b1;
      end else begin
        lane <= lane + 1'b1;
      end
      if (take) frame_valid <= valid;
      out.d <= mx_o & frame_valid;
      out.m <= frame_valid;
    end
  end

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    serializer #(.WW(WW)) u_s (
      .clk, .rst_n, .load(take), .word(words[i]),
      .shift(!take && lane == LW'(i)), .q(q[i])
    );
  end

  photonic_mux #(.N(LANES)) u_mx (.d(q), .sel(lane), .o(mx_o));
endmodule
