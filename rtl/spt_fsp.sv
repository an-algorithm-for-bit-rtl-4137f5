// spt_fsp: intermediate-digit function f_sp of the canonic SPT bit-serial adder.
//
// Computes sp_i = f_sp(a_i, b_i, c_i, sp_{i-1}) in the i-th cycle. The three
// incoming digits are added (Step 1 of the algorithm); a sum of +-1 gives an
// intermediate digit of +-1 and a sum of 0 or +-2 gives 0. When both this
// digit and the stored sp_{i-1} are nonzero, either adjustment rule of Step 2
// applies, and both of them clear sp_i to 0. The value leaves through the sp
// D register and is seen as sp_{i-1} in the next cycle.
//
// Interface: four SPT digits in (01 = +1, 00 = 0, 11 = -1), one digit out.
// Purely combinational. Input combinations outside the truth table get the
// value the same rules give (a choice of this design).
module spt_fsp
  import spt_pkg::*;
(
  input  spt_t a_i,
  input  spt_t b_i,
  input  spt_t c_i,
  input  spt_t sp_im1,
  output spt_t sp_i
);

  spt_step1_t step1;

  always_comb begin
    step1 = spt_step1(a_i, b_i, c_i);
    sp_i  = (spt_nz(step1.digit) && spt_nz(sp_im1)) ? SPT_ZERO : step1.digit;
  end

endmodule
