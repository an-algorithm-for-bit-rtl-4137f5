// tb_spt_dreg: self-checking testbench of spt_dreg, the one-digit D element.
//
// Holds reset for a few cycles and checks that the output is the digit 0,
// then drives a random stream of the three legal digit codes and checks that
// each output equals the input of the previous clock cycle. A second reset in
// mid-stream must clear the output at once, without waiting for a clock edge.
// A watchdog ends the run with a failure after 2000 cycles.
module tb_spt_dreg;
  import spt_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  spt_t d, q;
  int checks = 0;
  int failures = 0;

  spt_dreg dut (.clk, .rst_n, .d, .q);

  function automatic spt_t rand_digit();
    case ($urandom_range(2))
      0:       return SPT_ZERO;
      1:       return SPT_POS;
      default: return SPT_NEG;
    endcase
  endfunction

  task automatic check(input spt_t exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    d     = SPT_NEG;
    repeat (3) @(posedge clk);
    #1 check(SPT_ZERO, "reset");
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      d    = rand_digit();
      @(posedge clk);
      #1 check(d, "delay");
      if (t == 250) begin
        rst_n = 1'b0;
        #1 check(SPT_ZERO, "asynchronous reset");
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
