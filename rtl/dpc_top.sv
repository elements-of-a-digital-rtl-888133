// dpc_top - a fragment of the digital photonic computer: interface systems, the two-level static
// switch hierarchy, operand blocks and functional devices.
//
// Data enters as parallel RAM words: each of the N_EXT_IN input channels is an external memory
// interface system (emis_in) that turns LANES RAM channels of WW bits into one bit-serial stream.
// The second-level static switch SW2 distributes these streams, and the results coming up from
// the groups, to the N_GRP groups and to the N_EXT_OUT output interface systems (emis_out), which
// turn streams back into RAM words. Each group has a first-level static switch SW1.g and
// FD_PER_GRP pairs of an operand block (OB) and a functional device (FD); the FDs of group g are
// adders, multipliers or dividers for g mod 3 = 0, 1, 2, as in the example structure for the
// variance D = sum(x^2)/n - (sum(x)/n)^2. SW1.g feeds the x and y inputs of its OBs from the
// streams SW2 sends down and from the results of its own FDs, and sends streams back up to SW2.
// The switches are configured through one port before a computation and then left alone; the
// operand blocks synchronize their operand streams by themselves (see operand_block).
//
// Channel numbering (all channels are dpc_pkg::stream_t, data bit plus marker):
//   SW2   inputs : 0..N_EXT_IN-1 input systems; N_EXT_IN + g*SW1_DN + j = lane j up from group g
//         outputs: g*SW1_UP + j = lane j down to group g; N_GRP*SW1_UP + k = output system k
//   SW1.g inputs : 0..SW1_UP-1 lanes down from SW2; SW1_UP + f = result of FD f of the group
//         outputs: 2f = x of OB f, 2f+1 = y of OB f; 2*FD_PER_GRP + j = lane j up to SW2
//   cfg_sw selects the switch written: g for SW1.g, N_GRP for SW2.
// Timing: the switches are combinational except for a one-clock register on every lane from a
// group up to SW2, so no configuration can form a combinational loop. An OB (1 clock), an FD
// (FD_LAT = 126 clocks) and that register add up to 128 clocks, two 64-bit words: results of a
// device reach the next group on the same word grid as the input streams.
// OB/FD index i = g*FD_PER_GRP + f. Each OB's external memory port (for delays above 10^3
// clocks) is brought out, as the path through a static switch to RAM is outside this fragment.
//
// From the architecture: the hierarchy RAM - interface system - SW2 - SW1 - OB - FD, the group
// contents (3 adders, 3 multipliers, 3 dividers, 9 OBs), one-bit channels at the DPC clock and
// the interface system sizes. This design's choice: the lane counts between the switch levels
// (SW1_UP = 4, SW1_DN = 3), two input and three output channels, the configuration port and the
// subtract input of the adders.
// Lint may report rst_n as both synchronous and asynchronous (SYNCASYNCNET): that is the
// reset-disabled assertion inside ob_ctrl, not logic; see ob_ctrl.
module dpc_top
  import dpc_pkg::*;
#(
  parameter int unsigned N_GRP      = 3,
  parameter int unsigned FD_PER_GRP = 3,
  parameter int unsigned N_EXT_IN   = 2,
  parameter int unsigned N_EXT_OUT  = 3,
  parameter int unsigned SW1_UP     = 4,
  parameter int unsigned SW1_DN     = 3,
  parameter int unsigned LANES      = 64,
  parameter int unsigned WW         = 16,
  parameter int unsigned SYNC_N     = 1000,
  parameter int unsigned QW         = 17,
  parameter int unsigned RG_W       = 64,
  parameter int unsigned MAW        = 16,
  parameter int unsigned FD_LAT     = 126,
  parameter int unsigned NOB        = N_GRP * FD_PER_GRP,
  parameter int unsigned SW2_IN     = N_EXT_IN + N_GRP * SW1_DN,
  parameter int unsigned SW2_OUT    = N_GRP * SW1_UP + N_EXT_OUT,
  parameter int unsigned SW1_IN     = SW1_UP + FD_PER_GRP,
  parameter int unsigned SW1_OUT    = 2 * FD_PER_GRP + SW1_DN,
  parameter int unsigned CSW        = $clog2(((SW2_IN > SW1_IN) ? SW2_IN : SW1_IN) + 1),
  parameter int unsigned COW        = $clog2((SW2_OUT > SW1_OUT) ? SW2_OUT : SW1_OUT),
  parameter int unsigned CNW        = $clog2(N_GRP + 1)
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  // RAM side, input direction
  input  logic [N_EXT_IN-1:0][LANES-1:0][WW-1:0]  in_words,
  input  logic [N_EXT_IN-1:0]                     in_valid,
  output logic [N_EXT_IN-1:0]                     in_take,
  // RAM side, output direction
  output logic [N_EXT_OUT-1:0][LANES-1:0][WW-1:0] out_words,
  output logic [N_EXT_OUT-1:0]                    out_valid,
  // static switch configuration
  input  logic                                    cfg_we,
  input  logic [CNW-1:0]                          cfg_sw,
  input  logic [COW-1:0]                          cfg_out,
  input  logic [CSW-1:0]                          cfg_sel,
  // operand block controls
  input  logic [NOB-1:0]                          ob_sb,
  input  logic [NOB-1:0]                          ob_wc,
  input  logic [NOB-1:0]                          ob_avt,
  input  logic [NOB-1:0]                          ob_wd,
  input  logic [NOB-1:0][QW-1:0]                  ob_del,
  input  logic [NOB-1:0]                          fd_sub,
  output sm_t                                     ob_sm    [NOB],
  output ctrl_state_t                             ob_state [NOB],
  // operand block external memory ports
  output logic [NOB-1:0]                          mem_we,
  output logic [NOB-1:0][MAW-1:0]                 mem_waddr,
  output logic [NOB-1:0]                          mem_wdata,
  output logic [NOB-1:0][MAW-1:0]                 mem_raddr,
  input  logic [NOB-1:0]                          mem_rdata
);
  stream_t sw2_in  [SW2_IN];
  stream_t sw2_out [SW2_OUT];
  stream_t fd_r    [NOB];

  for (genvar k = 0; k < N_EXT_IN; k++) begin : g_in
    emis_in #(.LANES(LANES), .WW(WW)) u_emis (
      .clk, .rst_n, .words(in_words[k]), .valid(in_valid[k]), .take(in_take[k]),
      .out(sw2_in[k])
    );
  end

  static_switch #(.N_IN(SW2_IN), .N_OUT(SW2_OUT)) u_sw2 (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_sw == CNW'(N_GRP)),
    .cfg_out(($clog2(SW2_OUT))'(cfg_out)),
    .cfg_sel(($clog2(SW2_IN + 1))'(cfg_sel)),
    .in(sw2_in), .out(sw2_out)
  );

  for (genvar k = 0; k < N_EXT_OUT; k++) begin : g_out
    emis_out #(.LANES(LANES), .WW(WW)) u_emis (
      .clk, .rst_n, .in(sw2_out[N_GRP * SW1_UP + k]), .words(out_words[k]), .valid(out_valid[k])
    );
  end

  for (genvar g = 0; g < N_GRP; g++) begin : g_grp
    localparam fd_kind_t KIND = (g % 3 == 0) ? FD_ADD : (g % 3 == 1) ? FD_MUL : FD_DIV;
    stream_t sw1_in  [SW1_IN];
    stream_t sw1_out [SW1_OUT];

    for (genvar j = 0; j < SW1_UP; j++) begin : g_dn
      assign sw1_in[j] = sw2_out[g * SW1_UP + j];
    end
    // The lanes up to SW2 are registered: every path that could close a loop through the two
    // switch levels passes one of these registers.
    for (genvar j = 0; j < SW1_DN; j++) begin : g_up
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) sw2_in[N_EXT_IN + g * SW1_DN + j] <= '0;
        else        sw2_in[N_EXT_IN + g * SW1_DN + j] <= sw1_out[2 * FD_PER_GRP + j];
      end
    end

    static_switch #(.N_IN(SW1_IN), .N_OUT(SW1_OUT)) u_sw1 (
      .clk, .rst_n,
      .cfg_we(cfg_we && cfg_sw == CNW'(g)),
      .cfg_out(($clog2(SW1_OUT))'(cfg_out)),
      .cfg_sel(($clog2(SW1_IN + 1))'(cfg_sel)),
      .in(sw1_in), .out(sw1_out)
    );

    for (genvar f = 0; f < FD_PER_GRP; f++) begin : g_fd
      localparam int unsigned I = g * FD_PER_GRP + f;
      logic xo, yo, mxyo;

      assign sw1_in[SW1_UP + f] = fd_r[I];

      operand_block #(.SYNC_N(SYNC_N), .QW(QW), .RG_W(RG_W), .MAW(MAW)) u_ob (
        .clk, .rst_n,
        .x(sw1_out[2 * f].d), .mx(sw1_out[2 * f].m),
        .y(sw1_out[2 * f + 1].d), .my(sw1_out[2 * f + 1].m),
        .sb(ob_sb[I]), .wc(ob_wc[I]), .avt(ob_avt[I]), .wd(ob_wd[I]), .del(ob_del[I]),
        .xo, .yo, .mxyo, .sm(ob_sm[I]), .cstate(ob_state[I]),
        .mem_we(mem_we[I]), .mem_waddr(mem_waddr[I]), .mem_wdata(mem_wdata[I]),
        .mem_raddr(mem_raddr[I]), .mem_rdata(mem_rdata[I])
      );

      fd_fp64 #(.KIND(KIND), .LAT(FD_LAT)) u_fd (
        .clk, .rst_n, .a(xo), .b(yo), .m(mxyo), .sub(fd_sub[I]), .r(fd_r[I])
      );
    end
  end
endmodule
