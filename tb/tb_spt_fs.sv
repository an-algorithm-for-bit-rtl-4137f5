// tb_spt_fs: self-checking testbench of spt_fs, the function giving s_{i-1}.
//
// Applies, one per clock cycle, every row of the adder's truth table (the 37
// input combinations that canonic operands can produce) and compares the
// output with the table's s_{i-1} column. It then applies all 81 combinations
// of the four input digits and checks that the output is always one of the
// three legal digit codes (never 2'b10). A watchdog ends the run with a
// failure if it has not finished after 1000 cycles.
module tb_spt_fs;
  import spt_pkg::*;

  `include "tb/table1_rows.svh"

  logic clk = 1'b0;
  always #5 clk = ~clk;

  spt_t a_i, b_i, c_i, sp_im1, s_im1;
  int checks = 0;
  int failures = 0;

  spt_fs dut (.a_i, .b_i, .c_i, .sp_im1, .s_im1);

  function automatic spt_t enc(input int v);
    return (v > 0) ? 2'b01 : (v < 0) ? 2'b11 : 2'b00;
  endfunction

  function automatic int dec(input spt_t d);
    return (d == 2'b01) ? 1 : (d == 2'b11) ? -1 : 0;
  endfunction

  initial begin
    a_i = '0; b_i = '0; c_i = '0; sp_im1 = '0;
    for (int r = 0; r < TABLE1_ROWS; r++) begin
      a_i    = enc(TABLE1[r][0]);
      b_i    = enc(TABLE1[r][1]);
      c_i    = enc(TABLE1[r][2]);
      sp_im1 = enc(TABLE1[r][3]);
      @(posedge clk);
      checks++;
      if (s_im1 != enc(TABLE1[r][6])) begin
        failures++;
        $display("FAIL row %0d: a=%0d b=%0d c=%0d sp=%0d -> s_{i-1}=%0d, expected %0d", r,
                 TABLE1[r][0], TABLE1[r][1], TABLE1[r][2], TABLE1[r][3], dec(s_im1), TABLE1[r][6]);
      end
    end
    for (int k = 0; k < 81; k++) begin
      a_i    = enc((k % 3) - 1);
      b_i    = enc(((k / 3) % 3) - 1);
      c_i    = enc(((k / 9) % 3) - 1);
      sp_im1 = enc(((k / 27) % 3) - 1);
      @(posedge clk);
      checks++;
      if (s_im1 == 2'b10) begin
        failures++;
        $display("FAIL combination %0d: illegal digit code 2'b10", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
