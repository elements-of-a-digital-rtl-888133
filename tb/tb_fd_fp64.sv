// tb_fd_fp64 - self-checking test of the bit-serial FP64 functional devices.
// An adder (also run as a subtractor), a multiplier and a divider each receive the same stream
// of back-to-back operand words, least significant bit first, under one marker. Every result
// word is compared bit for bit with the simulator's own double-precision arithmetic on the same
// operands, and result bit 0 of word k must leave exactly LAT clocks after operand bit 0 of word
// k. Operands are random normal numbers, plus cancellation cases, zeros and equal operands.
`include "tb/tb_check.svh"
module tb_fd_fp64;
  import dpc_pkg::*;
  localparam int LAT = 126, NW = 400;
  logic clk = 0, rst_n = 0, a = 0, b = 0, m = 0, sub = 0;
  stream_t r_add, r_mul, r_div;
  int checks = 0, failures = 0;
  logic [63:0] av [NW], bv [NW];
  longint t0;
  longint now = 0;

  fd_fp64 #(.KIND(FD_ADD), .LAT(LAT)) u_add (.clk, .rst_n, .a, .b, .m, .sub, .r(r_add));
  fd_fp64 #(.KIND(FD_MUL), .LAT(LAT)) u_mul (.clk, .rst_n, .a, .b, .m, .sub(1'b0), .r(r_mul));
  fd_fp64 #(.KIND(FD_DIV), .LAT(LAT)) u_div (.clk, .rst_n, .a, .b, .m, .sub(1'b0), .r(r_div));

  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;
  initial begin
    repeat (2 * NW * 64 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  function automatic logic [63:0] rnd_fp();
    logic [10:0] e;
    e = 11'(1023 - 300 + $urandom_range(0, 600));
    return {1'($urandom), e, 20'($urandom), $urandom};
  endfunction

  // Collect result words of one device and compare them.
  task automatic collect(input int kind, input bit is_sub);
    for (int k = 0; k < NW; k++) begin
      logic [63:0] got, exp;
      real ra, rb;
      // wait for bit 0 of word k: exactly LAT clocks after operand bit 0
      while (now < t0 + longint'(k) * 64 + longint'(LAT)) begin
        @(posedge clk); #2;
      end
      for (int i = 0; i < 64; i++) begin
        got[i] = (kind == 0) ? r_add.d : (kind == 1) ? r_mul.d : r_div.d;
        `CHECK(((kind == 0) ? r_add.m : (kind == 1) ? r_mul.m : r_div.m) == 1'b1, "result marker")
        @(posedge clk); #2;
      end
      ra = $bitstoreal(av[k]);
      rb = $bitstoreal(bv[k]);
      case (kind)
        0: exp = $realtobits(is_sub ? ra - rb : ra + rb);
        1: exp = $realtobits(ra * rb);
        default: exp = $realtobits(ra / rb);
      endcase
      // the device keeps the sign of an exact zero only as far as x - x = +0
      `CHECK(got == exp, $sformatf("kind %0d word %0d: %h op %h = %h, expected %h", kind, k, av[k], bv[k], got, exp))
    end
  endtask

  task automatic run(input bit is_sub);
    for (int k = 0; k < NW; k++) begin
      av[k] = rnd_fp();
      bv[k] = rnd_fp();
      case (k % 10)
        1: bv[k] = {~av[k][63], av[k][62:0]};                    // exact cancellation
        2: bv[k] = {~av[k][63], av[k][62:1], ~av[k][0]};          // near cancellation
        3: bv[k] = {av[k][63], av[k][62:52] - 11'd1, bv[k][51:0]}; // close exponents
        4: bv[k] = av[k];
        5: av[k] = 64'd0;
        6: bv[k] = {bv[k][63], av[k][62:52] - 11'd60, bv[k][51:0]}; // far apart
        default: ;
      endcase
    end
    sub = is_sub;
    @(negedge clk);
    // clock numbering: now holds the number of the current clock cycle; operand bit 0 is in
    // cycle t0 and result bit 0 of word k must be in cycle t0 + 64 k + LAT
    t0 = now;
    fork
      begin
        for (int k = 0; k < NW; k++)
          for (int i = 0; i < 64; i++) begin
            m = 1; a = av[k][i]; b = bv[k][i];
            @(negedge clk);
          end
        m = 0; a = 0; b = 0;
      end
      collect(0, is_sub);
      collect(1, is_sub);
      collect(2, is_sub);
    join
    repeat (200) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run(0);
    run(1);
    `TB_END
  end
endmodule
