// tb_syncf - self-checking test of the tapped shift-register synchronizer.
// Feeds a random serial stream and checks o(t) = d(t - a) for delays 0, 3, 5, 6 (the three cases
// of the timing diagram), a few random values and the full depth N = 1000; also checks that the
// chain is fed zeros while w = 0.
`include "tb/tb_check.svh"
module tb_syncf;
  localparam int N = 1000;
  localparam int AW = $clog2(N + 1);
  logic clk = 0, rst_n = 0, w = 0, d = 0, o;
  logic [AW-1:0] a = '0;
  int checks = 0, failures = 0;
  bit hist[$];  // history of the bits fed into the chain, newest at the back

  syncf #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  task automatic run(input int delay, input int cycles);
    a = AW'(delay);
    for (int t = 0; t < cycles; t++) begin
      d = 1'($urandom);
      #1;
      hist.push_back(w & d);
      `CHECK(o == hist[hist.size() - 1 - delay], $sformatf("a=%0d t=%0d", delay, t))
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // the chain starts at zero: model that history
    for (int i = 0; i < N + 1; i++) hist.push_back(1'b0);
    w = 1;
    run(3, 200);
    run(5, 200);
    run(6, 200);
    run(0, 100);
    run(1, 100);
    for (int k = 0; k < 5; k++) run(int'($urandom_range(2, N - 1)), 300);
    run(N, 1500);
    w = 0;
    run(N, 50);
    run(7, 50);
    `TB_END
  end
endmodule
