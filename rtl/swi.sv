// swi - dynamic input switch of the operand block.
//
// A multiplexer/demultiplexer that steers the operand streams to the storage elements:
//   o1 -> rg    : x when ld = 0, y when ld = 1 (during an rg write ld carries sb);
//   o2 -> syncf : the leading stream (x when ld = 0, y when ld = 1);
//   o3 -> IWR   : the syncf output d3 in modes 0 and 3, so that the part of the leading stream that
//                 has passed through syncf goes on to external memory; otherwise 0.
// Purely combinational. Interface: d1 = x, d2 = y, d3 = syncf output, sm (mode), ld.
// From the architecture: inputs d1..d3, outputs o1..o3 and what each feeds. This design's choice:
// the select rules above and the extra ld select (the printed block shows sm only).
module swi
  import dpc_pkg::*;
(
  input  logic d1,
  input  logic d2,
  input  logic d3,
  input  sm_t  sm,
  input  logic ld,
  output logic o1,
  output logic o2,
  output logic o3
);
  assign o1 = ld ? d2 : d1;
  assign o2 = ld ? d2 : d1;
  assign o3 = (sm == SM_CONST || sm == SM_MEMORY) ? d3 : 1'b0;
endmodule
