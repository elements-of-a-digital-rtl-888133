// tb_rg_ring - self-checking test of the ring-buffer constant register.
// Loads a random 64-bit word serially with w = 1 for 64 clocks, then checks that the word
// recirculates on o with a one-clock delay after the multiplexer output (so bit i of the word is on
// o at clock i+1 after loading started) for several turns, that a second word replaces it, and
// that the tap input adds the expected extra delay.
`include "tb/tb_check.svh"
module tb_rg_ring;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, w = 0, d = 0;
  logic [$clog2(W)-1:0] tap = '0;
  logic o;
  int checks = 0, failures = 0;
  logic [W-1:0] word;

  rg_ring #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  task automatic load(input logic [W-1:0] v);
    for (int i = 0; i < W; i++) begin
      w = 1; d = v[i];
      @(posedge clk); #1;
      // o shows the bit written on the previous clock
      `CHECK(o == v[i], $sformatf("load echo bit %0d", i))
    end
    w = 0; d = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      word = {$urandom, $urandom};
      load(word);
      // recirculation: for 4 turns o repeats the word, bit i at offset i of each turn
      for (int t = 0; t < 4 * W; t++) begin
        d = 1'($urandom);  // must be ignored while w = 0
        @(posedge clk); #1;
        `CHECK(o == word[t % W], $sformatf("turn %0d bit %0d", t / W, t % W))
      end
    end
    // tap k: output taken k triggers further along, delayed by k more clocks
    for (int k = 1; k < W; k += 9) begin
      tap = k[$clog2(W)-1:0];
      for (int t = 0; t < 2 * W; t++) begin
        @(posedge clk); #1;
      end
      // e clocks after loading ended o (tap 0) shows word[(e-1) mod W]; tap k lags k more
      for (int t = 0; t < W; t++) begin
        `CHECK(o == word[(t - 1 - k + 2 * W) % W], $sformatf("tap %0d bit %0d", k, t))
        @(posedge clk); #1;
      end
    end
    `TB_END
  end
endmodule
