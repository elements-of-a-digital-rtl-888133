// tb_emis_out - self-checking test of the DPC -> RAM interface system at its default size.
// Sends streams of whole 1024-bit frames (and one stream ending inside a frame) and checks that
// each complete frame comes out as 64 words of 16 bits, with bit p of the frame in bit p / 64 of
// the word of lane p mod 64, valid pulsing once, visible in the second clock after the frame's last bit, and that
// the incomplete frame produces no valid pulse.
`include "tb/tb_check.svh"
module tb_emis_out;
  import dpc_pkg::*;
  localparam int LANES = 64, WW = 16, F = LANES * WW;
  logic clk = 0, rst_n = 0, valid;
  logic [LANES-1:0][WW-1:0] words;
  stream_t in = '0;
  int checks = 0, failures = 0;
  int nvalid = 0;

  emis_out #(.LANES(LANES), .WW(WW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && valid) nvalid++;
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  task automatic send(input int frames, input int extra);
    bit b [];
    b = new[frames * F + extra];
    foreach (b[i]) b[i] = 1'($urandom);
    for (int fr = 0; fr < frames; fr++) begin
      for (int p = 0; p < F; p++) begin
        in.m = 1; in.d = b[fr * F + p];
        @(posedge clk); #1;
        if (p == 0 && fr > 0) begin
          `CHECK(valid, $sformatf("valid after frame %0d", fr - 1))
          for (int k = 0; k < F; k++)
            `CHECK(words[k % LANES][k / LANES] == b[(fr - 1) * F + k], $sformatf("frame %0d bit %0d", fr - 1, k))
        end else begin
          `CHECK(!valid, "valid only once per frame")
        end
      end
    end
    for (int p = 0; p < extra; p++) begin
      in.m = 1; in.d = b[frames * F + p];
      @(posedge clk); #1;
      if (p == 0) `CHECK(valid, "valid after last whole frame")
    end
    in = '0;
    @(posedge clk); #1;
    if (extra == 0) begin
      `CHECK(valid, "valid after stream end")
      for (int k = 0; k < F; k++)
        `CHECK(words[k % LANES][k / LANES] == b[(frames - 1) * F + k], $sformatf("last frame bit %0d", k))
    end
    repeat (4) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    send(3, 0);
    `CHECK(nvalid == 3, $sformatf("3 frames, %0d valid pulses", nvalid))
    nvalid = 0;
    send(1, 500);
    `CHECK(nvalid == 1, $sformatf("partial frame dropped, %0d valid pulses", nvalid))
    `TB_END
  end
endmodule
