// spt_dreg: the D element of the canonic SPT bit-serial adder.
//
// Holds one SPT digit (01 = +1, 00 = 0, 11 = -1) for one clock cycle. The
// adder uses two of them: one turns sp_i into sp_{i-1}, the other turns the
// carry c_{i+1} into c_i for the next digit position.
//
// Timing: q takes the value of d at each rising edge of clk. An asynchronous
// active-low reset clears q to the digit 0; the reset is a choice of this
// design (a zero state is what the first digit of a word needs).
module spt_dreg
  import spt_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  spt_t d,
  output spt_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= SPT_ZERO;
    else        q <= d;
  end

endmodule
