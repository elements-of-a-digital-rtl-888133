// static_switch - static switch SW of the switching and synchronization subsystem.
//
// A multiplexer/demultiplexer between N_IN input channels and N_OUT output channels. Each output
// has a configuration register naming the input it is connected to (or none); several outputs
// may name the same input, which fans one stream out. The registers are written while the
// computing structure is being set up (cfg_we, cfg_out, cfg_sel) and stay fixed while a problem
// is being solved, so the switch itself has no clocked path: outputs follow inputs in the same
// clock. Used for the first-level switches SW1.k and the second-level switch SW2.
// Interface: in[N_IN], out[N_OUT] of dpc_pkg::stream_t (data bit and marker); configuration port.
// cfg_sel = N_IN (or any value >= N_IN) disconnects an output, which then carries zeros; that is
// also the reset state. From the architecture: the switch type and configuration at programming
// time. This design's choice: the configuration port and the per-output select registers.
module static_switch
  import dpc_pkg::*;
#(
  parameter int unsigned N_IN  = 8,
  parameter int unsigned N_OUT = 8,
  parameter int unsigned SW    = $clog2(N_IN + 1),
  parameter int unsigned OW    = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [OW-1:0] cfg_out,
  input  logic [SW-1:0] cfg_sel,
  input  stream_t       in  [N_IN],
  output stream_t       out [N_OUT]
);
  logic [SW-1:0] sel [N_OUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_OUT; j++) sel[j] <= SW'(N_IN);
    end else if (cfg_we && int'(cfg_out) < N_OUT) begin
      sel[cfg_out] <= cfg_sel;
    end
  end

  always_comb begin
    for (int j = 0; j < N_OUT; j++) begin
      out[j] = '0;
      for (int i = 0; i < N_IN; i++)
        if (int'(sel[j]) == i) out[j] = in[i];
    end
  end
endmodule
