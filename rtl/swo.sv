// swo - dynamic output switch of the operand block.
//
// Chooses what leaves the block on xo (o1) and yo (o2), by mode sm and leading stream ld:
//   sm = 0: the leading stream on its own output, the rg constant on the other;
//   sm = 1: x and y straight through;
//   sm = 2: the leading stream replaced by its syncf-delayed copy d4;
//   sm = 3: the leading stream replaced by its external-memory-delayed copy d5.
// The outputs and the marker mi -> mo are registered once (clock c), so every path through the
// block has the same one-clock latency. Interface: d1 = x, d2 = y, d3 = rg, d4 = syncf,
// d5 = IWR, sm, ld, mi; o1, o2, mo.
// From the architecture: the five inputs, the two outputs and the per-mode routing of the input
// table (mode 0: yo = rg when x leads, xo = rg when y leads). This design's choice: the output
// register and the ld select.
module swo
  import dpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic d1,
  input  logic d2,
  input  logic d3,
  input  logic d4,
  input  logic d5,
  input  sm_t  sm,
  input  logic ld,
  input  logic mi,
  output logic o1,
  output logic o2,
  output logic mo
);
  logic lead_n;  // replacement for the leading stream
  logic n1, n2;

  always_comb begin
    unique case (sm)
      SM_CONST:  lead_n = ld ? d2 : d1;
      SM_DIRECT: lead_n = ld ? d2 : d1;
      SM_SHIFT:  lead_n = d4;
      SM_MEMORY: lead_n = d5;
      default:   lead_n = ld ? d2 : d1;
    endcase
    if (sm == SM_CONST) begin
      n1 = ld ? d3 : lead_n;
      n2 = ld ? lead_n : d3;
    end else begin
      n1 = ld ? d1 : lead_n;
      n2 = ld ? lead_n : d2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o1 <= 1'b0;
      o2 <= 1'b0;
      mo <= 1'b0;
    end else begin
      o1 <= n1;
      o2 <= n2;
      mo <= mi;
    end
  end
endmodule
