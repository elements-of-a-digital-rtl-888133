// tb_ob_ctrl - self-checking test of the operand block control FSM.
// Drives the markers and control inputs and checks the outputs against the transition table:
// the measured out-of-sync value Delta (the number of clocks with exactly one marker high), the
// chosen mode and delay outputs (as for mode 2, ai for mode 3), ws / wi / wr / md, the rule that
// wi rises once Q reaches 10^3 in mode 0, the rg write lasting one 64-clock word, the del write
// and the forced modes, including the direct transition from write-del to modes 2 and 3.
`include "tb/tb_check.svh"
module tb_ob_ctrl;
  import dpc_pkg::*;
  localparam int N = 1000, QW = 17, RG_W = 64, AW = $clog2(N + 1);
  logic clk = 0, rst_n = 0, sb = 0, wc = 0, avt = 0, wd = 0, mx = 0, my = 0;
  logic [QW-1:0] del = '0;
  logic wr, ws, wi, ri, ld, md;
  logic [AW-1:0] as_o;
  logic [QW-1:0] ai;
  sm_t sm;
  ctrl_state_t state;
  int checks = 0, failures = 0;

  ob_ctrl #(.SYNC_N(N), .QW(QW), .RG_W(RG_W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  task automatic tick;
    @(posedge clk); #1;
  endtask

  // Lead alone for gap clocks, then both; check mode outputs on the fixing clock and after.
  task automatic gap_run(input bit lead_y, input int gap, input bit forced, input int dval);
    int exp_mode;
    exp_mode = (dval == 0) ? 1 : (dval <= N) ? 2 : 3;
    for (int i = 0; i < gap; i++) begin
      mx = !lead_y; my = lead_y;
      #1;
      `CHECK(sm == SM_CONST && ws && md && ld == lead_y, $sformatf("mode0 gap=%0d i=%0d", gap, i))
      `CHECK(wi == (forced ? (dval > N) : (i >= N)), $sformatf("wi gap=%0d i=%0d", gap, i))
      tick();
    end
    mx = 1; my = 1;
    for (int i = 0; i < 5; i++) begin
      #1;
      `CHECK(int'(sm) == exp_mode, $sformatf("mode gap=%0d i=%0d sm=%0d", gap, i, sm))
      `CHECK(md, "md in mode")
      if (exp_mode == 2) `CHECK(int'(as_o) == dval && ws && !wi, $sformatf("as gap=%0d", gap))
      if (exp_mode == 3) `CHECK(int'(ai) == dval && wi && ri, $sformatf("ai gap=%0d", gap))
      tick();
    end
    // the leading stream ends; the mode holds while the lagging one is still present
    mx = lead_y; my = !lead_y;
    #1;
    `CHECK(int'(sm) == exp_mode, "mode holds after lead ends")
    tick();
    mx = 0; my = 0;
    #1;
    `CHECK(sm == SM_CONST && !md && !ws && !wi, "back to mode 0")
    tick(); tick();
    `CHECK(state == ST_MODE0, "idle state")
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    tick();
    gap_run(0, 0, 0, 0);
    gap_run(0, 1, 0, 1);
    gap_run(1, 3, 0, 3);
    gap_run(0, 999, 0, 999);
    gap_run(1, 1000, 0, 1000);
    gap_run(0, 1001, 0, 1001);
    gap_run(1, 4321, 0, 4321);
    // rg write: one marker with wc = 1 -> wr for exactly RG_W clocks, then mode 0
    sb = 1; wc = 1; my = 1;
    for (int i = 0; i < RG_W; i++) begin
      #1;
      `CHECK(wr && !md && ld == 1'b1, $sformatf("wr clock %0d", i))
      tick();
    end
    wc = 0;
    #1;
    `CHECK(!wr && state == ST_MODE0 && md, "wr ends after one word");
    sb = 0; my = 0;
    tick(); tick();
    // write del = 37 and use it forced while the streams are 4 clocks apart
    wc = 1; wd = 1; del = 37;
    tick();
    `CHECK(state == ST_WDEL, "write del state")
    wc = 0; wd = 0; avt = 1;
    tick();
    gap_run(0, 4, 1, 37);
    // forced delay above 10^3
    avt = 0; wc = 1; wd = 1; del = 2500;
    tick();
    wc = 0; wd = 0; avt = 1;
    tick();
    gap_run(1, 10, 1, 2500);
    // write-del directly followed by both streams: write del -> mode 2 / mode 3
    avt = 0; wc = 1; wd = 1; del = 12;
    tick();
    `CHECK(state == ST_WDEL, "write del state 2")
    wc = 0; wd = 0; avt = 1; mx = 1; my = 1;
    #1;
    `CHECK(sm == SM_SHIFT && int'(as_o) == 12, "write del -> mode 2")
    tick();
    `CHECK(state == ST_MODE2, "in mode 2")
    mx = 0; my = 0;
    tick();
    avt = 0; wc = 1; wd = 1; del = 1500;
    tick();
    wc = 0; wd = 0; avt = 1; mx = 1; my = 1;
    #1;
    `CHECK(sm == SM_MEMORY && int'(ai) == 1500, "write del -> mode 3")
    tick();
    `CHECK(state == ST_MODE3, "in mode 3")
    mx = 0; my = 0; avt = 0;
    tick();
    `TB_END
  end
endmodule
