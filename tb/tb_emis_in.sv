// tb_emis_in - self-checking test of the RAM -> DPC interface system at its default size
// (64 lanes of 16 bits, 1024-clock frames).
// Offers random frames of words, one every take pulse, with valid set for some frames, and
// checks every stream bit: bit p of a frame must be bit p / 64 of the word of lane p mod 64, with
// the marker equal to the frame's valid; take must pulse exactly once per 1024 clocks.
`include "tb/tb_check.svh"
module tb_emis_in;
  import dpc_pkg::*;
  localparam int LANES = 64, WW = 16, F = LANES * WW;
  logic clk = 0, rst_n = 0, valid = 0, take;
  logic [LANES-1:0][WW-1:0] words = '0;
  stream_t out;
  int checks = 0, failures = 0;

  emis_in #(.LANES(LANES), .WW(WW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    logic [LANES-1:0][WW-1:0] cur, prev;
    logic cv, pv;
    pv = 0;
    prev = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // the first clock after reset is the last of an empty frame: take is high
    `CHECK(take, "take after reset")
    for (int fr = 0; fr < 6; fr++) begin
      for (int l = 0; l < LANES; l++) words[l] = WW'($urandom);
      valid = (fr != 2);
      cur = words;
      cv = valid;
      #0;
      `CHECK(take, $sformatf("take at frame %0d", fr))
      @(posedge clk); #1;
      words = '0;
      valid = 0;  // only the value offered with take counts
      // the last bit of the previous frame leaves now
      if (fr > 0) begin
        `CHECK(out.m == pv && out.d == (pv & prev[LANES - 1][WW - 1]), "last bit of frame")
      end
      // frame bit p is on out one clock after its MX slot, the first of which is this clock
      for (int p = 0; p < F - 1; p++) begin
        @(posedge clk); #1;
        `CHECK(out.m == cv, $sformatf("marker frame %0d bit %0d", fr, p))
        `CHECK(out.d == (cv & cur[p % LANES][p / LANES]), $sformatf("frame %0d bit %0d", fr, p))
        if (p < F - 2) `CHECK(!take, "take only once per frame")
      end
      prev = cur;
      pv = cv;
    end
    `TB_END
  end
endmodule
