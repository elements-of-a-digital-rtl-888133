// tb_iwr - self-checking test of the external memory access interface.
// With a behavioural memory on its port, a random stream written continuously must come back on
// o exactly a clocks later, counting the PRE clocks it is taken to have spent in syncf before it
// reaches the interface: o(t) = d(t - (a - PRE)). Checked for the smallest memory delay, random
// delays and the largest one the 2^MAW buffer allows, and o = 0 while r = 0.
`include "tb/tb_check.svh"
module tb_iwr;
  localparam int QW = 17, MAW = 16, PRE = 1000;
  logic clk = 0, rst_n = 0, d = 0, w = 0, r = 0, o;
  logic [QW-1:0] a = '0;
  logic mem_we, mem_wdata, mem_rdata;
  logic [MAW-1:0] mem_waddr, mem_raddr;
  int checks = 0, failures = 0;
  bit hist[$];

  iwr #(.QW(QW), .MAW(MAW), .PRE(PRE)) dut (.*);
  bit_ram_model #(.AW(MAW)) ram (.clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                                 .raddr(mem_raddr), .rdata(mem_rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  task automatic run(input int delay, input int cycles);
    a = QW'(delay);
    for (int t = 0; t < cycles; t++) begin
      d = 1'($urandom);
      #1;
      hist.push_back(d);
      if (hist.size() > delay - PRE)
        `CHECK(o == (r & hist[hist.size() - 1 - (delay - PRE)]), $sformatf("a=%0d t=%0d", delay, t))
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    w = 1;
    r = 1;
    run(PRE + 1, 300);
    run(PRE + 2, 300);
    run(PRE + 1000, 3000);
    for (int k = 0; k < 3; k++) run(int'($urandom_range(PRE + 3, PRE + 40000)), 45000);
    run(PRE + 2**MAW - 1, 2**MAW + 500);
    r = 0;
    run(PRE + 5, 200);
    `TB_END
  end
endmodule
