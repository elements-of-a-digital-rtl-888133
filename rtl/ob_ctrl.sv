// ob_ctrl - control block ctrl of the operand block.
//
// It measures how far apart the two operand streams x and y arrive and picks the synchronization
// mode. The counter Q adds one on every clock on which exactly one marker is high
// (Q_i = Q_{i-1} + 1 if mx_i xor my_i); the out-of-sync value Delta is fixed on the clock on which
// both markers become high (Delta = Q when (not mx_{i-1} or not my_{i-1}) and mx_i and my_i):
// that is the clock on which the control block leaves mode 0 for mode 1, 2 or 3.
// Delta = 0 gives mode 1, 0 < Delta <= SYNC_N mode 2 (syncf delay as = Delta), Delta > SYNC_N
// mode 3 (external memory delay ai = Delta). With avt = 1 the forced delay del, written
// beforehand with wc = wd = 1 while both markers are low, replaces Delta. While only one stream is
// present the block is in mode 0: the leading stream goes out paired with the constant in rg and
// is written into syncf (ws = 1); once Q reaches SYNC_N it also goes on to external memory
// (wi = 1). One marker with wc = 1, avt = 0, wd = 0 loads rg from x (sb = 0) or y (sb = 1).
//
// Outputs are Mealy: they follow the next state, so on the very clock on which the lagging stream
// arrives the switches already select the delayed copy of the leading one. The datapath
// registers its outputs once, in swo.
// Interface: sb, wc, avt, wd, del, mx, my in; wr, ws, wi, ri, as_o (syncf delay), ai (IWR delay),
// sm (mode number), ld (1: y leads; during an rg write, the source sb), md (output data marker)
// and the state itself (for observation) out.
//
// From the architecture: the counter and Delta formulas, the states and their transition
// conditions, the 10^3 boundary, the sm/ws/wi/wr/md/as/ai actions. This design's choices:
//  - the control table's "not ws" in the mode 1-3 conditions is read as "not wc", as in the
//    table of input signals;
//  - ws stays 1 in mode 3, because the stream to external memory is taken from the syncf output;
//  - the write-rg state lasts RG_W clocks (one word); the write-del state one clock;
//  - modes 1-3 hold until both markers are low; Q restarts at 0 when both markers are low;
//  - ld, ri (IWR read enable) and the md timing are this design's own.
// The assertion below is disabled while rst_n is low; lint tools that see rst_n both there and
// as the asynchronous reset of the registers report it as used both ways (SYNCASYNCNET). The
// assertion is not logic, so this is harmless.
module ob_ctrl
  import dpc_pkg::*;
#(
  parameter int unsigned SYNC_N = 1000,
  parameter int unsigned QW     = 17,
  parameter int unsigned RG_W   = 64,
  parameter int unsigned AW     = $clog2(SYNC_N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sb,
  input  logic          wc,
  input  logic          avt,
  input  logic          wd,
  input  logic [QW-1:0] del,
  input  logic          mx,
  input  logic          my,
  output logic          wr,
  output logic          ws,
  output logic          wi,
  output logic          ri,
  output logic [AW-1:0] as_o,
  output logic [QW-1:0] ai,
  output sm_t           sm,
  output logic          ld,
  output logic          md,
  output ctrl_state_t   state
);
  ctrl_state_t          ns;
  logic [QW-1:0]        q, dlt, del_r, dsel, dcur;
  logic                 lead_r;
  logic [$clog2(RG_W):0] rg_cnt;
  logic                 one, both, none;

  assign one  = mx ^ my;
  assign both = mx & my;
  assign none = ~mx & ~my;
  // Delay that decides the mode: the forced value or the measured one (Delta = Q).
  assign dsel = avt ? del_r : q;

  always_comb begin
    ns = state;
    unique case (state)
      ST_MODE0: begin
        if (wc && wd && !avt && none)            ns = ST_WDEL;
        else if (one && wc && !avt && !wd)       ns = ST_WRG;
        else if (both && !wc && !wd) begin
          if (dsel == '0)                        ns = ST_MODE1;
          else if (dsel <= QW'(SYNC_N))          ns = ST_MODE2;
          else                                   ns = ST_MODE3;
        end
      end
      ST_WRG:   if (rg_cnt == ($clog2(RG_W)+1)'(RG_W - 1)) ns = ST_MODE0;
      ST_WDEL: begin
        if (both && avt && !wc && !wd)
          ns = (del_r <= QW'(SYNC_N)) ? ST_MODE2 : ST_MODE3;
        else
          ns = ST_MODE0;
      end
      ST_MODE1, ST_MODE2, ST_MODE3:
        if (none || wd) ns = ST_MODE0;
      default: ns = ST_MODE0;
    endcase
  end

  // Delay in force: captured value once a mode 1-3 is running, the live one on the fixing clock.
  assign dcur = (state == ST_MODE1 || state == ST_MODE2 || state == ST_MODE3) ? dlt : dsel;

  always_comb begin
    // Leading stream; on entry to the write-rg state it is the rg source chosen by sb.
    if (state == ST_MODE0 && one) ld = (ns == ST_WRG) ? sb : my;
    else                          ld = lead_r;
    wr   = 1'b0;
    ws   = 1'b0;
    wi   = 1'b0;
    ri   = 1'b0;
    md   = 1'b0;
    sm   = SM_CONST;
    as_o = AW'(SYNC_N);
    ai   = '0;
    if (state == ST_WRG) begin
      wr = 1'b1;
    end else begin
      unique case (ns)
        ST_MODE0: begin
          if (one) begin
            ws = 1'b1;
            md = 1'b1;
            wi = avt ? (del_r > QW'(SYNC_N)) : (q >= QW'(SYNC_N));
          end
        end
        ST_WRG:  wr = 1'b1;
        ST_MODE1: begin
          sm = SM_DIRECT;
          md = ld ? mx : my;
        end
        ST_MODE2: begin
          sm   = SM_SHIFT;
          ws   = 1'b1;
          as_o = AW'(dcur);
          md   = ld ? mx : my;
        end
        ST_MODE3: begin
          sm = SM_MEMORY;
          ws = 1'b1;
          wi = 1'b1;
          ri = 1'b1;
          ai = dcur;
          md = ld ? mx : my;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_MODE0;
      q      <= '0;
      dlt    <= '0;
      del_r  <= '0;
      lead_r <= 1'b0;
      rg_cnt <= 1;
    end else begin
      state <= ns;
      if (state == ST_MODE0 && wc && wd && !avt && none) del_r <= del;
      if (state == ST_WRG) rg_cnt <= rg_cnt + 1'b1;
      else                 rg_cnt <= 1;  // the entry clock already writes bit 0
      if (state == ST_MODE0 || state == ST_WDEL) begin
        if (none || ns == ST_WRG || state == ST_WDEL) q <= '0;
        else if (one && q != '1) q <= q + 1'b1;
        lead_r <= none ? 1'b0 : ld;
        if (ns == ST_MODE1 || ns == ST_MODE2 || ns == ST_MODE3) dlt <= dsel;
      end
    end
  end

  // A rg write needs exactly one stream to take the constant from.
  a_wrg_one_stream: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_MODE0 && ns == ST_WRG) |-> one);
endmodule
