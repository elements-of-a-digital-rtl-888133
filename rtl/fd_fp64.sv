// fd_fp64 - bit-serial FP64 functional device (adder SUM, multiplier MUL or divider DIV).
//
// Receives two operand streams a and b, least significant bit first, with one common marker m
// (the synchronized output of an operand block), and returns the result stream r. Operand bits
// are collected for one 64-bit word (word boundaries count from the rising marker); on the clock
// of the last bit the word-level IEEE 754 operation of fp64_pkg is applied and the result is
// shifted out, least significant bit first, from the next clock on, followed by a serial delay
// line so that result bit 0 leaves LAT clocks after operand bit 0. Streams of consecutive words
// are processed at the full rate of one word per 64 clocks. With sub = 1 an adder computes a - b.
// Interface: a, b, m, sub in; r (dpc_pkg::stream_t) out.
// From the architecture: adders, multipliers and dividers working on the FP64 format, fed by
// operand blocks. This design's choice: the word-collect / compute / shift-out structure, the
// simplified rounding cases of fp64_pkg, the sub input and LAT = 126, which makes an operand
// block (1 clock), a device and one switch register exactly two words long, so that results stay
// on the 64-clock word grid of the streams feeding them.
module fd_fp64
  import dpc_pkg::*;
#(
  parameter fd_kind_t    KIND = FD_ADD,
  parameter int unsigned LAT  = 126
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    a,
  input  logic    b,
  input  logic    m,
  input  logic    sub,
  output stream_t r
);
  localparam int unsigned W     = 64;
  localparam int unsigned EXTRA = LAT - W;

  logic [W-2:0] sa, sb_w;  // bits received so far of the current word
  logic [W-1:0] wa, wb, res, osr, omk;
  logic [5:0]   cnt;
  logic         last;
  stream_t      ser;

  assign last = m && (cnt == 6'd63);
  assign wa   = {a, sa};
  assign wb   = {b, sb_w};

  always_comb begin
    unique case (KIND)
      FD_MUL:  res = fp64_pkg::fp_mul(wa, wb);
      FD_DIV:  res = fp64_pkg::fp_div(wa, wb);
      default: res = fp64_pkg::fp_add(wa, sub ? {~wb[W-1], wb[W-2:0]} : wb);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa   <= '0;
      sb_w <= '0;
      cnt  <= '0;
      osr  <= '0;
      omk  <= '0;
    end else begin
      sa   <= wa[W-1:1];
      sb_w <= wb[W-1:1];
      cnt  <= m ? cnt + 1'b1 : '0;
      if (last) begin
        osr <= res;
        omk <= '1;
      end else begin
        osr <= {1'b0, osr[W-1:1]};
        omk <= {1'b0, omk[W-1:1]};
      end
    end
  end

  assign ser = '{d: osr[0], m: omk[0]};

  // Serial delay line making up the rest of the latency.
  if (EXTRA == 0) begin : g_nodly
    assign r = ser;
  end else begin : g_dly
    stream_t line [EXTRA];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < EXTRA; i++) line[i] <= '0;
      end else begin
        line[0] <= ser;
        for (int i = 1; i < EXTRA; i++) line[i] <= line[i-1];
      end
    end
    assign r = line[EXTRA-1];
  end

  initial assert (LAT >= W) else $error("fd_fp64: LAT must be at least one word");
endmodule
