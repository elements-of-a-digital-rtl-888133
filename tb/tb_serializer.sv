// tb_serializer - self-checking test of the 16:1 serializer: random words are loaded and shifted
// out with random gaps between shift pulses; q must give bit 0 first, then bits 1..15.
`include "tb/tb_check.svh"
module tb_serializer;
  localparam int WW = 16;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, q;
  logic [WW-1:0] word = '0;
  int checks = 0, failures = 0;

  serializer #(.WW(WW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    logic [WW-1:0] v;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 50; r++) begin
      v = WW'($urandom);
      load = 1; word = v;
      @(posedge clk); #1;
      load = 0; word = '0;
      for (int b = 0; b < WW; b++) begin
        `CHECK(q == v[b], $sformatf("word %0d bit %0d", r, b))
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1 `CHECK(q == v[b], "held between shifts")
        shift = 1;
        @(posedge clk); #1;
        shift = 0;
      end
    end
    `TB_END
  end
endmodule
