// tb_swo - exhaustive self-checking test of the operand block output switch.
// For every input combination, mode and leading stream it checks, one clock later, the two
// outputs against the routing table: mode 0 puts rg (d3) on the output of the missing stream,
// mode 1 passes x and y, modes 2 and 3 replace the leading stream by d4 or d5.
`include "tb/tb_check.svh"
module tb_swo;
  import dpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic d1, d2, d3, d4, d5, ld, mi, o1, o2, mo;
  sm_t sm;
  int checks = 0, failures = 0;
  logic x1, x2;

  swo dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    {d1, d2, d3, d4, d5, ld, mi} = '0;
    sm = SM_CONST;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int v = 0; v < 512; v++) begin
      {d1, d2, d3, d4, d5, ld, mi} = v[6:0];
      sm = sm_t'(v[8:7]);
      case (v[8:7])
        2'd0: begin x1 = ld ? d3 : d1; x2 = ld ? d2 : d3; end
        2'd1: begin x1 = d1;           x2 = d2;           end
        2'd2: begin x1 = ld ? d1 : d4; x2 = ld ? d4 : d2; end
        default: begin x1 = ld ? d1 : d5; x2 = ld ? d5 : d2; end
      endcase
      @(posedge clk); #1;
      `CHECK(o1 == x1, $sformatf("o1 v=%0d", v))
      `CHECK(o2 == x2, $sformatf("o2 v=%0d", v))
      `CHECK(mo == v[0], $sformatf("mo v=%0d", v))
    end
    `TB_END
  end
endmodule
