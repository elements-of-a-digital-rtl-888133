// tb_photonic_mux - self-checking test of the 64:1 time-division multiplexer: for random inputs
// every select value must put the named input on the output.
`include "tb/tb_check.svh"
module tb_photonic_mux;
  localparam int N = 64;
  logic [N-1:0] d;
  logic [5:0] sel;
  logic o;
  int checks = 0, failures = 0;

  photonic_mux #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      d = {$urandom, $urandom};
      for (int s = 0; s < N; s++) begin
        sel = 6'(s);
        #1;
        `CHECK(o == d[s], $sformatf("sel %0d", s))
      end
    end
    `TB_END
  end
endmodule
