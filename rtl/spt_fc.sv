// spt_fc: carry function f_c of the canonic SPT bit-serial adder.
//
// Computes c_{i+1} = f_c(a_i, b_i, c_i, sp_{i-1}) in the i-th cycle. The three
// incoming digits are added (Step 1 of the algorithm). A sum of +-2 gives a
// carry of +-1. A sum of +-1 gives an intermediate digit sp_i = +-1 and no
// carry, unless the stored digit sp_{i-1} is nonzero with the same sign: then
// 2^i + 2^(i-1) = 2^(i+1) - 2^(i-1) is applied and the carry takes the sign of
// sp_i (Step 2, second rule). With opposite signs no carry is produced.
//
// Interface: four SPT digits in (01 = +1, 00 = 0, 11 = -1), one digit out.
// Purely combinational. The function follows the rules and truth table of the
// algorithm; the input combinations that the table leaves out (they cannot
// arise from canonic operands) get the value the same rules give, which is a
// choice of this design rather than a minimised don't-care cover.
module spt_fc
  import spt_pkg::*;
(
  input  spt_t a_i,
  input  spt_t b_i,
  input  spt_t c_i,
  input  spt_t sp_im1,
  output spt_t c_ip1
);

  spt_step1_t step1;
  logic       same_sign_pair;

  always_comb begin
    step1          = spt_step1(a_i, b_i, c_i);
    same_sign_pair = spt_nz(step1.digit) && spt_nz(sp_im1)
                     && (spt_neg(step1.digit) == spt_neg(sp_im1));
    c_ip1          = same_sign_pair ? step1.digit : step1.carry;
  end

endmodule
