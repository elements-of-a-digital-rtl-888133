// tb_photonic_demux - self-checking test of the 1:64 time-division demultiplexer: the input must
// appear on the selected line only, all other lines staying 0.
`include "tb/tb_check.svh"
module tb_photonic_demux;
  localparam int N = 64;
  logic d;
  logic [5:0] sel;
  logic [N-1:0] o;
  int checks = 0, failures = 0;

  photonic_demux #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int s = 0; s < N; s++) begin
        logic [N-1:0] e;
        d = 1'($urandom);
        sel = 6'(s);
        e = '0;
        e[s] = d;
        #1;
        `CHECK(o == e, $sformatf("sel %0d", s))
      end
    end
    `TB_END
  end
endmodule
