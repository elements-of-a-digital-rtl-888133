// operand_block - block of dynamic switching and synchronization of operand streams (OB).
//
// Sits in front of a functional device and hands it its two operand streams in step. The control
// block ctrl watches the markers mx / my, measures how far the streams are apart and picks a mode:
//   mode 0  one stream only: it goes out paired with the constant held in rg (yo = rg when x
//           leads, xo = rg when y leads) and is meanwhile written into syncf, and from 10^3 clocks
//           on also into external memory through IWR, in case the second stream arrives;
//   mode 1  streams in step: x -> xo, y -> yo;
//   mode 2  out of step by 1..10^3 clocks: the leading stream is delayed in syncf;
//   mode 3  out of step by more than 10^3 clocks: it is delayed through syncf and IWR.
// Forced operation: del written with wc = wd = 1 and then avt = 1 replaces the measured value.
// Loading rg: one stream present, wc = 1, avt = wd = 0, source chosen by sb; the constant is then
// kept circulating in the ring register.
// Interface: streams x, y with markers mx, my; controls sb, wc, avt, wd, del; outputs xo, yo and
// the common output marker mxyo; sm and the control state for observation; IWR memory port. Timing: xo, yo and mxyo follow the inputs by
// one clock in every mode (the register in swo), plus the mode 2 / mode 3 delay of the leading
// stream.
// From the architecture: the block's parts (swi, swo, rg, syncf, IWR, ctrl), their connections
// and the modes. This design's choices are listed in the headers of the parts; here, the rg
// output is taken after its last trigger (RG_TAP), so the constant comes out one word after it
// went in and lines up with the words of the streams.
// Lint may report rst_n as both synchronous and asynchronous (SYNCASYNCNET): that is the
// reset-disabled assertion inside ob_ctrl, not logic; see ob_ctrl.
module operand_block
  import dpc_pkg::*;
#(
  parameter int unsigned SYNC_N = 1000,
  parameter int unsigned QW     = 17,
  parameter int unsigned RG_W   = 64,
  parameter int unsigned MAW    = 16,
  // rg output trigger: RG_W - 1 takes it after the last trigger, a delay of one whole word, so a
  // constant stays on the 64-clock word grid of the stream it was loaded from
  parameter int unsigned RG_TAP = RG_W - 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           x,
  input  logic           y,
  input  logic           mx,
  input  logic           my,
  input  logic           sb,
  input  logic           wc,
  input  logic           avt,
  input  logic           wd,
  input  logic [QW-1:0]  del,
  output logic           xo,
  output logic           yo,
  output logic           mxyo,
  output sm_t            sm,
  output ctrl_state_t    cstate,
  output logic           mem_we,
  output logic [MAW-1:0] mem_waddr,
  output logic           mem_wdata,
  output logic [MAW-1:0] mem_raddr,
  input  logic           mem_rdata
);
  localparam int unsigned AW = $clog2(SYNC_N + 1);

  logic          wr, ws, wi, ri, ld, md;
  logic [AW-1:0] as_d;
  logic [QW-1:0] ai;
  logic          to_rg, to_syncf, to_iwr;
  logic          rg_o, syncf_o, iwr_o;

  ob_ctrl #(.SYNC_N(SYNC_N), .QW(QW), .RG_W(RG_W)) u_ctrl (
    .clk, .rst_n, .sb, .wc, .avt, .wd, .del, .mx, .my,
    .wr, .ws, .wi, .ri, .as_o(as_d), .ai, .sm, .ld, .md, .state(cstate)
  );

  swi u_swi (
    .d1(x), .d2(y), .d3(syncf_o), .sm, .ld,
    .o1(to_rg), .o2(to_syncf), .o3(to_iwr)
  );

  rg_ring #(.W(RG_W)) u_rg (
    .clk, .rst_n, .w(wr), .d(to_rg), .tap(($clog2(RG_W))'(RG_TAP)), .o(rg_o)
  );

  syncf #(.N(SYNC_N)) u_syncf (
    .clk, .rst_n, .w(ws), .d(to_syncf), .a(as_d), .o(syncf_o)
  );

  iwr #(.QW(QW), .MAW(MAW), .PRE(SYNC_N)) u_iwr (
    .clk, .rst_n, .d(to_iwr), .w(wi), .a(ai), .r(ri), .o(iwr_o),
    .mem_we, .mem_waddr, .mem_wdata, .mem_raddr, .mem_rdata
  );

  swo u_swo (
    .clk, .rst_n, .d1(x), .d2(y), .d3(rg_o), .d4(syncf_o), .d5(iwr_o),
    .sm, .ld, .mi(md), .o1(xo), .o2(yo), .mo(mxyo)
  );
endmodule
