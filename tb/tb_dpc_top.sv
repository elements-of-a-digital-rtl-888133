// tb_dpc_top - end-to-end test of the DPC fragment at its default parameters.
//
// RAM words go in through the input interface systems, through SW2 and the group switches, the
// operand blocks and the FP64 devices, and come back as RAM words from the output systems. The
// test first loads a constant n into the rg register of the first divider's operand block (the
// "programming" step, its own switch configuration), then configures this structure:
//   x^2      = MUL(x, x)                 operand block in mode 1 (streams in step)
//   x^2 / n  = DIV(x^2, rg = n)          mode 0 (one stream plus the stored constant)
//   out0     = SUM(x, x^2 / n)           mode 2: x arrives 256 clocks before x^2 / n
//   out1     = SUM(x, y)                 mode 3: y is sent two frames (2048 clocks) after x
//   out2     = SUM(x delayed 64, x)      forced mode 2 with del = 64 written beforehand
// x is three frames (48 FP64 words) and y three frames. Every output word that the output
// systems deliver is compared with double-precision arithmetic done here on the same values,
// including the words produced before the second stream arrives (then the partner operand is
// the rg register, which holds 0 in those blocks). The clocks spent in each operand block state,
// external memory traffic and interface frames are counted, and each must occur.
`include "tb/tb_check.svh"
module tb_dpc_top;
  import dpc_pkg::*;
  localparam int LANES = 64, WW = 16, F = LANES * WW, WPF = F / 64;  // 16 words per frame
  localparam int NOB = 9, QW = 17, MAW = 16;
  localparam int NX = 3 * WPF, NY = 3 * WPF;

  logic clk = 0, rst_n = 0;
  logic [1:0][LANES-1:0][WW-1:0] in_words = '0;
  logic [1:0] in_valid = '0, in_take;
  logic [2:0][LANES-1:0][WW-1:0] out_words;
  logic [2:0] out_valid;
  logic cfg_we = 0;
  logic [1:0] cfg_sw = '0;
  logic [3:0] cfg_out = '0, cfg_sel = '0;
  logic [NOB-1:0] ob_sb = '0, ob_wc = '0, ob_avt = '0, ob_wd = '0, fd_sub = '0;
  logic [NOB-1:0][QW-1:0] ob_del = '0;
  sm_t ob_sm [NOB];
  ctrl_state_t ob_state [NOB];
  logic [NOB-1:0] mem_we, mem_wdata, mem_rdata;
  logic [NOB-1:0][MAW-1:0] mem_waddr, mem_raddr;
  int checks = 0, failures = 0;

  real xv [NX], yv [NY], nval;
  logic [63:0] got [3][$];
  int st_cnt [6];
  int mem_writes = 0, mem_reads = 0, frames_in = 0, frames_out = 0;

  dpc_top dut (.*);

  for (genvar i = 0; i < NOB; i++) begin : g_mem
    bit_ram_model #(.AW(MAW)) u_ram (.clk, .we(mem_we[i]), .waddr(mem_waddr[i]),
      .wdata(mem_wdata[i]), .raddr(mem_raddr[i]), .rdata(mem_rdata[i]));
  end

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  // mechanism counters and output collection
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NOB; i++) begin
      st_cnt[int'(ob_state[i])]++;
      if (mem_we[i]) mem_writes++;
      if (ob_sm[i] == SM_MEMORY) mem_reads++;
    end
    for (int k = 0; k < 2; k++) if (in_take[k] && in_valid[k]) frames_in++;
    for (int k = 0; k < 3; k++)
      if (out_valid[k]) begin
        frames_out++;
        for (int w = 0; w < WPF; w++) begin
          logic [63:0] v;
          for (int b = 0; b < 64; b++) v[b] = out_words[k][b][w];
          got[k].push_back(v);
        end
      end
  end

  task automatic cfg(input int sw, input int o, input int s);
    @(negedge clk);
    cfg_we = 1; cfg_sw = 2'(sw); cfg_out = 4'(o); cfg_sel = 4'(s);
    @(negedge clk);
    cfg_we = 0;
  endtask

  // Offer one frame on input channel k: bit i of FP64 word w goes to bit w of lane i.
  task automatic frame(input int k, input bit v, input logic [63:0] wv [WPF]);
    @(negedge clk);
    while (!in_take[k]) @(negedge clk);
    in_valid[k] = v;
    for (int i = 0; i < LANES; i++)
      for (int w = 0; w < WW; w++) in_words[k][i][w] = wv[w][i];
    @(negedge clk);
    in_valid[k] = 0;
  endtask

  function automatic logic [63:0] rnd_fp();
    return $realtobits(($urandom_range(1, 1000000) / 1000.0) * ($urandom_range(0, 1) == 1 ? -1.0 : 1.0));
  endfunction

  task automatic check_out(input int k, input int nw, input string tag);
    `CHECK(got[k].size() == nw, $sformatf("%s: %0d words delivered, %0d expected", tag, got[k].size(), nw))
  endtask

  initial begin
    logic [63:0] wv [WPF];
    repeat (3) @(posedge clk);
    rst_n = 1;
    nval = 37.5;
    foreach (xv[i]) xv[i] = $bitstoreal(rnd_fp());
    foreach (yv[i]) yv[i] = $bitstoreal(rnd_fp());

    // ---- programming step: load n into rg of the first divider's operand block (index 6)
    cfg(3, 8, 1);        // SW2: input channel 1 -> group 2, lane 0
    cfg(2, 1, 0);        // SW1.2: lane 0 -> y of OB 0
    ob_sb[6] = 1;
    ob_wc[6] = 1;
    foreach (wv[w]) wv[w] = $realtobits(nval);
    fork
      frame(1, 1, wv);
      begin
        while (ob_state[6] != ST_WRG) @(negedge clk);
        ob_wc[6] = 0;
      end
    join
    repeat (F + 200) @(negedge clk);
    ob_sb[6] = 0;
    cfg(3, 8, 15);       // disconnect
    cfg(2, 1, 15);

    // ---- structure for the computation
    cfg(3, 0, 0);        // x -> group 0 lane 0
    cfg(3, 4, 0);        // x -> group 1 lane 0
    cfg(3, 9, 5);        // MUL result (group 1 up 0) -> group 2 lane 1
    cfg(3, 2, 8);        // DIV result (group 2 up 0) -> group 0 lane 2
    cfg(3, 1, 1);        // y -> group 0 lane 1
    cfg(3, 12, 2);       // group 0 up 0..2 -> output systems 0..2
    cfg(3, 13, 3);
    cfg(3, 14, 4);
    cfg(1, 0, 0);        // SW1.1: x to both inputs of OB 3
    cfg(1, 1, 0);
    cfg(1, 6, 4);        // MUL 0 result up
    cfg(2, 0, 1);        // SW1.2: x^2 -> x of OB 6
    cfg(2, 6, 4);        // DIV 0 result up
    cfg(0, 0, 0);        // SW1.0: OB 0 <- x, x^2/n
    cfg(0, 1, 2);
    cfg(0, 2, 0);        // OB 1 <- x, y
    cfg(0, 3, 1);
    cfg(0, 4, 0);        // OB 2 <- x, x
    cfg(0, 5, 0);
    cfg(0, 6, 4);        // SUM results up
    cfg(0, 7, 5);
    cfg(0, 8, 6);
    // forced delay of 64 clocks for OB 2
    @(negedge clk);
    ob_wc[2] = 1; ob_wd[2] = 1; ob_del[2] = 64;
    @(negedge clk);
    ob_wc[2] = 0; ob_wd[2] = 0; ob_avt[2] = 1;

    // ---- data: x on channel 0 for three frames; y on channel 1 from two frames later
    fork
      for (int fr = 0; fr < 3; fr++) begin
        foreach (wv[w]) wv[w] = $realtobits(xv[fr * WPF + w]);
        frame(0, 1, wv);
      end
      begin
        foreach (wv[w]) wv[w] = '0;
        frame(1, 0, wv);
        frame(1, 0, wv);
        for (int fr = 0; fr < 3; fr++) begin
          foreach (wv[w]) wv[w] = $realtobits(yv[fr * WPF + w]);
          frame(1, 1, wv);
        end
      end
    join
    repeat (3 * F) @(negedge clk);

    // ---- results
    // out0: 4 words of x + 0 while x^2/n is on its way, then x + x^2/n; 3 whole frames
    check_out(0, 3 * WPF, "out0");
    foreach (got[0][j]) begin
      real e;
      e = (j < 4) ? xv[j] : xv[j - 4] + xv[j - 4] * xv[j - 4] / nval;
      `CHECK(got[0][j] == $realtobits(e), $sformatf("out0 word %0d: %h expected %h", j, got[0][j], $realtobits(e)))
    end
    // out1: 32 words of x + 0 (y two frames late), then x + y; 5 whole frames
    check_out(1, 5 * WPF, "out1");
    foreach (got[1][j]) begin
      real e;
      e = (j < 32) ? xv[j] : xv[j - 32] + yv[j - 32];
      `CHECK(got[1][j] == $realtobits(e), $sformatf("out1 word %0d: %h expected %h", j, got[1][j], $realtobits(e)))
    end
    // out2: x delayed one word plus x
    check_out(2, 3 * WPF, "out2");
    foreach (got[2][j]) begin
      real e;
      e = (j == 0) ? xv[0] : xv[j - 1] + xv[j];
      `CHECK(got[2][j] == $realtobits(e), $sformatf("out2 word %0d: %h expected %h", j, got[2][j], $realtobits(e)))
    end

    foreach (st_cnt[i]) begin
      $display("COUNT operand block clocks in %s: %0d", ctrl_state_t'(i), st_cnt[i]);
      `CHECK(st_cnt[i] > 0, $sformatf("state %0d never used", i))
    end
    $display("COUNT external memory writes %0d, mode 3 reads %0d", mem_writes, mem_reads);
    $display("COUNT frames in %0d, frames out %0d", frames_in, frames_out);
    `CHECK(mem_writes > 0 && mem_reads > 0, "external memory path used")
    `CHECK(frames_in == 7 && frames_out == 11, "interface frames")
    `TB_END
  end
endmodule
