// tb_swi - exhaustive self-checking test of the operand block input switch.
// Applies every combination of the three data inputs, the four modes and ld, and compares the
// three outputs with the routing rules written out independently here.
`include "tb/tb_check.svh"
module tb_swi;
  import dpc_pkg::*;
  logic d1, d2, d3, ld, o1, o2, o3;
  sm_t sm;
  int checks = 0, failures = 0;
  logic e1, e2, e3;

  swi dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {d1, d2, d3, ld} = v[3:0];
      sm = sm_t'(v[5:4]);
      #1;
      e1 = (ld == 1'b0) ? d1 : d2;
      e2 = (ld == 1'b0) ? d1 : d2;
      e3 = (v[5:4] == 2'd0 || v[5:4] == 2'd3) ? d3 : 1'b0;
      `CHECK(o1 == e1, $sformatf("o1 v=%0d", v))
      `CHECK(o2 == e2, $sformatf("o2 v=%0d", v))
      `CHECK(o3 == e3, $sformatf("o3 v=%0d", v))
    end
    `TB_END
  end
endmodule
