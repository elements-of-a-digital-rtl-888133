// tb_deserializer - self-checking test of the 1:16 deserializer: random bits are shifted in,
// least significant first, with random gaps; after 16 shifts word must equal the sent word.
`include "tb/tb_check.svh"
module tb_deserializer;
  localparam int WW = 16;
  logic clk = 0, rst_n = 0, shift = 0, din = 0;
  logic [WW-1:0] word;
  int checks = 0, failures = 0;

  deserializer #(.WW(WW)) dut (.*);

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
      for (int b = 0; b < WW; b++) begin
        din = v[b]; shift = 1;
        @(posedge clk); #1;
        shift = 0; din = 1'($urandom);
        repeat ($urandom_range(0, 2)) @(posedge clk);
        #1;
      end
      `CHECK(word == v, $sformatf("word %0d: %h vs %h", r, word, v))
    end
    `TB_END
  end
endmodule
