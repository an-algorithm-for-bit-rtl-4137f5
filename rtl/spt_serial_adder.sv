// spt_serial_adder: bit-serial adder for numbers in canonic SPT form.
//
// Adds two numbers a and b whose digits a_i, b_i are +1, 0 or -1 with no two
// neighbouring digits nonzero (canonic signed-power-of-two form), and returns
// the sum in the same canonic form. One digit of each operand enters per
// clock cycle, least significant digit first. In cycle i the digits a_i, b_i
// and the stored carry c_i are added into a new carry c_{i+1} and an
// intermediate digit sp_i. sp_i is not final: if it and the stored sp_{i-1}
// are both nonzero, the pair is rewritten so that no two neighbouring sum
// digits are nonzero (2^i - 2^(i-1) = 2^(i-1) and
// 2^i + 2^(i-1) = 2^(i+1) - 2^(i-1)). Digit s_{i-1} is therefore output in
// cycle i: the latency is one cycle.
//
// Structure: three combinational functions f_c, f_sp, f_s, all fed by a_i,
// b_i, c_i and sp_{i-1}, and two D registers holding c_{i+1} and sp_i for the
// next cycle. This follows the block diagram and truth table of the
// algorithm.
//
// Interface (digit code: 01 = +1, 00 = 0, 11 = -1):
//   start   high in the cycle of digit 0 of a new operand pair. It forces
//           c_0 = 0 and sp_{-1} = 0, so words may follow each other without a
//           gap. In that cycle s_im1 is s_{-1} = 0.
//   s_im1   sum digit i-1 in cycle i; s_first marks digit 0 of a sum, one
//           cycle after start.
// Word framing is a choice of this design. The carry of a word is not carried
// past its end. In a word of W digit positions, the digit s_{W-1} would appear
// in the cycle of the next start, which shows 0 instead, so the whole sum must
// fit in W-1 positions. Two zero top digits on both operands ensure this,
// because the canonic sum of two M-digit canonic numbers fits in M+1 digits.
// The assertions check the invariants the algorithm rests on for canonic
// operands: a_i, b_i and c_i are never all nonzero, and c_i and sp_{i-1} are
// never both nonzero.
module spt_serial_adder
  import spt_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  spt_t a_i,
  input  spt_t b_i,
  output spt_t s_im1,
  output logic s_first
);

  spt_t c_q, sp_q;      // D register outputs
  spt_t c_i, sp_im1;    // state seen by the functions (zero at start)
  spt_t c_ip1, sp_i;    // next state

  assign c_i    = start ? SPT_ZERO : c_q;
  assign sp_im1 = start ? SPT_ZERO : sp_q;

  spt_fc  u_fc  (.a_i, .b_i, .c_i, .sp_im1, .c_ip1);
  spt_fsp u_fsp (.a_i, .b_i, .c_i, .sp_im1, .sp_i);
  spt_fs  u_fs  (.a_i, .b_i, .c_i, .sp_im1, .s_im1);

  spt_dreg u_d_sp (.clk, .rst_n, .d(sp_i),  .q(sp_q));
  spt_dreg u_d_c  (.clk, .rst_n, .d(c_ip1), .q(c_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_first <= 1'b0;
    else        s_first <= start;
  end

  // Lemma 1: a_i, b_i and c_i are never nonzero together.
  a_lemma1: assert property (@(posedge clk) disable iff (!rst_n)
    !(spt_nz(a_i) && spt_nz(b_i) && spt_nz(c_i)));

  // Lemmas 2 and 3: a nonzero carry never meets a nonzero sp_{i-1}.
  a_carry_sp: assert property (@(posedge clk) disable iff (!rst_n)
    !(spt_nz(c_i) && spt_nz(sp_im1)));

endmodule
