// tb_operand_block - self-checking test of the operand block with its default sizes
// (syncf depth 10^3, 64-bit rg, 2^16-bit external buffer).
// Each scenario sends two random bit-serial streams of L bits, the second one gap clocks after the
// first, and checks every output bit one clock after the inputs it depends on, against values
// computed here from the stream contents alone:
//   before the second stream arrives (mode 0): leading stream on its own output, rg on the other;
//   afterwards: lagging stream unchanged, leading stream delayed by gap (or by the forced del).
// Scenarios: streams in step (mode 1), gaps 3, 5, 6, 500 and 1000 (mode 2) with either stream
// leading, gaps 1001 and 5000 (mode 3), an rg write followed by a lone stream (mode 0 with a
// constant), and forced delays del = 20 (mode 2) and del = 1200 (mode 3). The control state seen
// on each scenario is counted and every mode must occur.
`include "tb/tb_check.svh"
module tb_operand_block;
  import dpc_pkg::*;
  localparam int N = 1000, QW = 17, MAW = 16, RG_W = 64;
  logic clk = 0, rst_n = 0;
  logic x = 0, y = 0, mx = 0, my = 0, sb = 0, wc = 0, avt = 0, wd = 0;
  logic [QW-1:0] del = '0;
  logic xo, yo, mxyo;
  sm_t sm;
  ctrl_state_t cstate;
  logic mem_we, mem_wdata, mem_rdata;
  logic [MAW-1:0] mem_waddr, mem_raddr;
  int checks = 0, failures = 0;
  int seen[6];
  // rg model: the stored word and the clock on which its load started
  logic [RG_W-1:0] rg_word = '0;
  longint rg_t0 = 0;
  longint now = 0;

  operand_block #(.SYNC_N(N), .QW(QW), .RG_W(RG_W), .MAW(MAW)) dut (.*);
  bit_ram_model #(.AW(MAW)) ram (.clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                                 .raddr(mem_raddr), .rdata(mem_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    now <= now + 1;
    seen[int'(cstate)]++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  // rg output, taken after its last trigger: a word loaded from clock rg_t0 on reappears from
  // clock rg_t0 + RG_W on, in step with the word grid of the stream it came from.
  function automatic logic rg_bit(longint u);
    if (u < rg_t0 + longint'(RG_W)) return 1'b0;
    return rg_word[int'((u - rg_t0) % longint'(RG_W))];
  endfunction

  // One clock: apply inputs, let the edge come, compare with the expected outputs.
  task automatic step(input logic xi, yi, mxi, myi, input logic ex, ey, em, input bit chk,
                      input string tag);
    x = xi; y = yi; mx = mxi; my = myi;
    @(posedge clk); #1;
    if (chk) begin
      `CHECK(xo == ex, {tag, " xo"})
      `CHECK(yo == ey, {tag, " yo"})
      `CHECK(mxyo == em, {tag, " mxyo"})
    end
  endtask

  task automatic idle(input int n);
    for (int i = 0; i < n; i++) step(0, 0, 0, 0, 0, 0, 0, 0, "idle");
  endtask

  // Two streams of L bits; the leading one (y when lead_y) starts gap clocks before the other.
  // dly is the delay the block is expected to apply to the leading stream.
  task automatic pair(input bit lead_y, input int gap, input int dly, input int L, input string tag);
    bit a[], b[];
    longint base;
    a = new[L];
    b = new[L];
    foreach (a[i]) begin a[i] = 1'($urandom); b[i] = 1'($urandom); end
    base = now;
    for (int u = 0; u < gap + L; u++) begin
      logic ma, mb, da, db, ea, eb, em;
      bit chk;
      ma = (u < L);
      mb = (u >= gap);
      da = ma ? a[u] : 1'b0;
      db = mb ? b[u - gap] : 1'b0;
      chk = 1;
      if (!mb) begin
        // mode 0: lead plus constant
        ea = da;
        eb = rg_bit(base + longint'(u));
        em = 1'b1;
      end else begin
        eb = db;
        em = 1'b1;
        if (u - dly >= 0 && u - dly < L) ea = a[u - dly];
        else begin
          ea = 1'b0;
          chk = (dly <= N);  // syncf holds zeros there; external memory holds older data
        end
      end
      if (lead_y) step(db, da, mb, ma, eb, ea, em, chk, $sformatf("%s u=%0d", tag, u));
      else        step(da, db, ma, mb, ea, eb, em, chk, $sformatf("%s u=%0d", tag, u));
    end
    idle(3);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    idle(2);
    pair(0, 0, 0, 300, "mode1");
    pair(0, 3, 3, 300, "gap3");
    pair(1, 5, 5, 300, "gap5y");
    pair(0, 6, 6, 300, "gap6");
    pair(1, 500, 500, 800, "gap500y");
    pair(0, 1000, 1000, 1500, "gap1000");
    pair(0, 1001, 1001, 1500, "gap1001");
    pair(1, 5000, 5000, 5500, "gap5000y");
    // rg write from y (sb = 1): 64 clocks of a constant with wc = 1
    begin
      logic [RG_W-1:0] k;
      k = {$urandom, $urandom};
      sb = 1; wc = 1;
      for (int i = 0; i < RG_W; i++) begin
        if (i == 0) rg_t0 = now;
        step(0, k[i], 0, 1, 0, 0, 0, 0, "wrg");
      end
      rg_word = k;
      sb = 0; wc = 0;
      idle(2);
      // a lone x stream: yo carries the constant
      for (int u = 0; u < 400; u++) begin
        logic b;
        b = 1'($urandom);
        step(b, 0, 1, 0, b, rg_bit(now), 1, 1, $sformatf("const u=%0d", u));
      end
      idle(3);
      pair(0, 40, 40, 200, "gap40 after rg");
    end
    // forced delay 20 while the streams are 7 clocks apart
    wc = 1; wd = 1; del = 20;
    step(0, 0, 0, 0, 0, 0, 0, 0, "wdel");
    wc = 0; wd = 0; avt = 1;
    idle(2);
    pair(0, 7, 20, 300, "forced20");
    // forced delay 1200 (external memory) while the streams are 300 clocks apart
    avt = 0;
    wc = 1; wd = 1; del = 1200;
    step(0, 0, 0, 0, 0, 0, 0, 0, "wdel");
    wc = 0; wd = 0; avt = 1;
    idle(2);
    pair(1, 300, 1200, 2000, "forced1200");
    avt = 0;
    idle(2);
    foreach (seen[i]) begin
      $display("COUNT state %s: %0d clocks", ctrl_state_t'(i), seen[i]);
      `CHECK(seen[i] > 0, $sformatf("state %0d never reached", i))
    end
    `TB_END
  end
endmodule
