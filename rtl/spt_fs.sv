// spt_fs: output function f_s of the canonic SPT bit-serial adder.
//
// Computes the final sum digit s_{i-1} = f_s(a_i, b_i, c_i, sp_{i-1}) in the
// i-th cycle, one cycle after the inputs of position i-1 were seen. The
// incoming digits are added (Step 1 of the algorithm) to find the unadjusted
// digit sp_i. If sp_i and sp_{i-1} are both nonzero, Step 2 adjusts:
//   opposite signs: 2^i - 2^(i-1) = 2^(i-1), so s_{i-1} = -sp_{i-1};
//   same signs:     2^i + 2^(i-1) = 2^(i+1) - 2^(i-1), so s_{i-1} = -sp_{i-1}
//                   (the 2^(i+1) term leaves as the carry, see spt_fc).
// Otherwise s_{i-1} = sp_{i-1} unchanged.
//
// Interface: four SPT digits in (01 = +1, 00 = 0, 11 = -1), one digit out.
// Purely combinational. Input combinations outside the truth table get the
// value the same rules give (a choice of this design).
module spt_fs
  import spt_pkg::*;
(
  input  spt_t a_i,
  input  spt_t b_i,
  input  spt_t c_i,
  input  spt_t sp_im1,
  output spt_t s_im1
);

  spt_step1_t step1;

  always_comb begin
    step1 = spt_step1(a_i, b_i, c_i);
    s_im1 = spt_nz(step1.digit) ? spt_negate(sp_im1) : sp_im1;
  end

endmodule
