// spt_pkg: types and helpers shared by the canonic SPT bit-serial adder.
//
// A signed-power-of-two (SPT) digit takes the values +1, 0 and -1 and is
// carried on two wires in the 2's complement style:
//   +1 = 2'b01,  0 = 2'b00,  -1 = 2'b11.
// The code 2'b10 is never produced by the adder. On an input it is read as
// 0, because bit 0 alone decides whether a digit is nonzero; this reading of
// the unused code is a choice of this design.
package spt_pkg;

  typedef logic [1:0] spt_t;

  localparam spt_t SPT_ZERO = 2'b00;
  localparam spt_t SPT_POS  = 2'b01;
  localparam spt_t SPT_NEG  = 2'b11;

  // Digit is +1 or -1.
  function automatic logic spt_nz(input spt_t d);
    return d[0];
  endfunction

  // Digit is -1.
  function automatic logic spt_neg(input spt_t d);
    return d[0] & d[1];
  endfunction

  // Digit value as a small signed integer (-1, 0, +1).
  function automatic logic signed [2:0] spt_val(input spt_t d);
    return d[0] ? (d[1] ? -3'sd1 : 3'sd1) : 3'sd0;
  endfunction

  // Negated digit.
  function automatic spt_t spt_negate(input spt_t d);
    return d[0] ? {~d[1], 1'b1} : SPT_ZERO;
  endfunction

  // Step 1 of the algorithm: a_i + b_i + c_i split into a carry c_{i+1}
  // (weight 2^(i+1)) and an unadjusted intermediate digit sp_i (weight 2^i).
  // Sums of +-2 give a carry and sp_i = 0, sums of +-1 give sp_i = +-1 and no
  // carry. A sum of +-3 cannot occur with canonic operands (all three
  // nonzero at once is ruled out); it is split as carry +-1 and digit +-1.
  typedef struct packed {
    spt_t carry;
    spt_t digit;
  } spt_step1_t;

  function automatic spt_step1_t spt_step1(input spt_t a, input spt_t b, input spt_t c);
    logic signed [2:0] sum;
    spt_step1_t r;
    sum = spt_val(a) + spt_val(b) + spt_val(c);
    unique case (sum)
      3'sd0:  r = '{carry: SPT_ZERO, digit: SPT_ZERO};
      3'sd1:  r = '{carry: SPT_ZERO, digit: SPT_POS};
      -3'sd1: r = '{carry: SPT_ZERO, digit: SPT_NEG};
      3'sd2:  r = '{carry: SPT_POS,  digit: SPT_ZERO};
      -3'sd2: r = '{carry: SPT_NEG,  digit: SPT_ZERO};
      3'sd3:  r = '{carry: SPT_POS,  digit: SPT_POS};
      -3'sd3: r = '{carry: SPT_NEG,  digit: SPT_NEG};
      default: r = '{carry: SPT_ZERO, digit: SPT_ZERO};
    endcase
    return r;
  endfunction

endpackage
