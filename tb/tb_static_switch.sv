// tb_static_switch - self-checking test of the static switch.
// Checks that all outputs are disconnected after reset, then applies random configurations
// (including fan-out of one input to several outputs and disconnection) and random input
// traffic, comparing every output with the input its configuration names.
`include "tb/tb_check.svh"
module tb_static_switch;
  import dpc_pkg::*;
  localparam int NI = 7, NO = 9, SW = $clog2(NI + 1), OW = $clog2(NO);
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [OW-1:0] cfg_out = '0;
  logic [SW-1:0] cfg_sel = '0;
  stream_t in [NI];
  stream_t out [NO];
  int checks = 0, failures = 0;
  int model [NO];

  static_switch #(.N_IN(NI), .N_OUT(NO)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  task automatic traffic(input int n);
    for (int t = 0; t < n; t++) begin
      foreach (in[i]) in[i] = stream_t'($urandom_range(0, 3));
      #1;
      foreach (out[j]) begin
        stream_t e;
        e = (model[j] < NI) ? in[model[j]] : stream_t'(2'b00);
        `CHECK(out[j] == e, $sformatf("out %0d sel %0d", j, model[j]))
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    foreach (in[i]) in[i] = '0;
    foreach (model[j]) model[j] = NI;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    traffic(5);
    for (int r = 0; r < 40; r++) begin
      int o, s;
      o = $urandom_range(0, NO - 1);
      s = $urandom_range(0, NI);
      cfg_we = 1; cfg_out = OW'(o); cfg_sel = SW'(s);
      @(posedge clk); #1;
      cfg_we = 0;
      model[o] = s;
      traffic(10);
    end
    `TB_END
  end
endmodule
