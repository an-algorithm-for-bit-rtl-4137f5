// tb_spt_serial_adder: end-to-end self-checking testbench of the canonic SPT
// bit-serial adder.
//
// Builds a stream of operand pairs in canonic SPT form, each framed by a start
// pulse on its digit 0, and feeds them one digit per cycle, least significant
// first. Frame lengths vary from 3 to 40 digits. Operands come either as random
// canonic digit strings or as the canonic form of random integers. Most frames
// keep their two top digits zero so that the whole sum fits; some are filled
// to the top (the sum then overflows the frame), every 50th pair is the
// largest-magnitude canonic value added to itself, and some are followed by idle
// cycles of zero digits without a start pulse.
//
// Expected output: the canonic (non-adjacent) form of the integer sum a + b,
// computed here by the usual division-by-two recoding, independently of the
// adder's rules. Since that form is unique, the adder must reproduce it digit
// for digit: sum digit k must appear k + 1 cycles after the start pulse (one
// cycle of latency, one digit per cycle), with s_first high in the cycle of
// digit 0. For an overflowing frame the top digit is not checked, because the
// next start pulse clears it. Every output digit is also checked to keep the
// canonic property: no two neighbouring nonzero digits within a frame.
//
// A digit-level model of the adding and adjusting steps counts how often each
// mechanism of the algorithm is exercised: a carry from a sum of +-2, the
// opposite-sign adjustment 2^i - 2^(i-1) = 2^(i-1), the same-sign adjustment
// 2^i + 2^(i-1) = 2^(i+1) - 2^(i-1) with its carry, a start pulse clearing
// nonzero leftover state, and idle gaps. A mechanism never seen is a failure.
// The same model checks that every combination of a_i, b_i, c_i and sp_{i-1}
// met during the run is one of the 37 rows of the truth table (the others are
// the don't-care combinations), and that all 37 rows are reached.
// A watchdog stops the run with a failure after 400000 cycles.
module tb_spt_serial_adder;
  import spt_pkg::*;

  `include "tb/table1_rows.svh"

  localparam int NFRAMES = 3000;
  localparam int MAXLEN  = 200000;
  localparam int WMAX    = 40;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, s_first;
  spt_t a_i, b_i, s_im1;

  spt_serial_adder dut (.clk, .rst_n, .start, .a_i, .b_i, .s_im1, .s_first);

  // Stimulus and expectations, one entry per cycle.
  int  st_a   [MAXLEN];
  int  st_b   [MAXLEN];
  bit  st_st  [MAXLEN];
  int  ex_s   [MAXLEN];
  bit  ex_chk [MAXLEN];
  bit  ex_new [MAXLEN];    // first output cycle of a frame (no neighbour check)
  int  ncyc;

  int checks = 0;
  int failures = 0;
  int n_carry = 0, n_adj_opp = 0, n_adj_same = 0, n_start_clear = 0, n_gap = 0,
      n_overflow = 0, n_rows = 0;

  function automatic spt_t enc(input int v);
    return (v > 0) ? SPT_POS : (v < 0) ? SPT_NEG : SPT_ZERO;
  endfunction

  function automatic int dec(input spt_t d);
    return (d == SPT_POS) ? 1 : (d == SPT_NEG) ? -1 : 0;
  endfunction

  // Canonic (non-adjacent) digits of v, least significant first.
  function automatic void naf(input longint v, output int d [WMAX+2]);
    longint x = v;
    for (int k = 0; k < WMAX + 2; k++) begin
      if (x % 2 != 0) begin
        d[k] = (((x % 4) + 4) % 4 == 1) ? 1 : -1;
        x    = x - d[k];
      end else begin
        d[k] = 0;
      end
      x = x / 2;
    end
  endfunction

  // Random canonic digit string with nonzero digits only below position 'top'.
  function automatic void rand_canonic(input int top, output int d [WMAX+2]);
    for (int k = 0; k < WMAX + 2; k++) begin
      if (k < top && (k == 0 || d[k-1] == 0) && $urandom_range(1) == 1)
        d[k] = $urandom_range(1) ? 1 : -1;
      else
        d[k] = 0;
    end
  endfunction

  function automatic longint value(input int d [WMAX+2]);
    longint v = 0;
    for (int k = WMAX + 1; k >= 0; k--) v = 2 * v + d[k];
    return v;
  endfunction

  // Build the whole stimulus.
  task automatic build();
    int da [WMAX+2], db [WMAX+2], ds [WMAX+2];
    int w, top, gap, t;
    bit ovf;
    longint lim;
    t = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      w   = $urandom_range(WMAX, 3);
      ovf = ($urandom_range(9) == 0);
      top = ovf ? w : w - 2;
      if (f % 50 == 0) begin
        // Largest-magnitude operands: alternating digits from the top down,
        // whose sum needs every position the headroom allows.
        for (int k = 0; k < WMAX + 2; k++) begin
          da[k] = (k < top && ((top - 1 - k) % 2 == 0)) ? ((f % 100 == 0) ? 1 : -1) : 0;
          db[k] = da[k];
        end
      end else if ($urandom_range(1) == 1) begin
        rand_canonic(top, da);
        rand_canonic(top, db);
      end else begin
        // Random integers whose canonic form fits below 'top'.
        lim = ((longint'(1) << (top + 1)) - 1) / 3;
        naf(longint'($urandom_range(32'hffff_ffff)) * 64'd7919 % (2 * lim + 1) - lim, da);
        naf(longint'($urandom_range(32'hffff_ffff)) * 64'd104729 % (2 * lim + 1) - lim, db);
      end
      naf(value(da) + value(db), ds);
      for (int k = 0; k < w; k++) begin
        st_a[t+k]  = da[k];
        st_b[t+k]  = db[k];
        st_st[t+k] = (k == 0);
        // Sum digit k leaves in the cycle after digit k entered.
        ex_s[t+k+1]   = ds[k];
        ex_chk[t+k+1] = !(ovf && k == w - 1);
        ex_new[t+k+1] = (k == 0);
      end
      if (ovf) n_overflow++;
      t += w;
      gap = ovf ? 0 : (($urandom_range(4) == 0) ? $urandom_range(3, 1) : 0);
      for (int g = 0; g < gap; g++) begin
        st_a[t] = 0; st_b[t] = 0; st_st[t] = 1'b0; n_gap++;
        ex_s[t+1] = 0; ex_chk[t+1] = 1'b1; ex_new[t+1] = 1'b0;
        t++;
      end
    end
    st_a[t] = 0; st_b[t] = 0; st_st[t] = 1'b1;   // closing start pulse
    ex_chk[0] = 1'b0;
    ncyc = t + 1;
  endtask

  // Digit-level model of Steps 1 and 2, used only to count mechanisms.
  int m_c = 0, m_sp = 0;
  bit row_seen [TABLE1_ROWS];
  task automatic model_step(input int a, input int b, input bit st);
    int c, sp, sum, car, dig;
    bit found;
    c  = st ? 0 : m_c;
    sp = st ? 0 : m_sp;
    // The four inputs of the functions must form one of the truth table's
    // rows: the other combinations cannot arise from canonic operands.
    found = 1'b0;
    for (int r = 0; r < TABLE1_ROWS; r++)
      if (TABLE1[r][0] == a && TABLE1[r][1] == b && TABLE1[r][2] == c && TABLE1[r][3] == sp) begin
        found       = 1'b1;
        row_seen[r] = 1'b1;
      end
    checks++;
    if (!found) begin
      failures++;
      $display("FAIL combination a=%0d b=%0d c=%0d sp=%0d is not in the truth table", a, b, c, sp);
    end
    if (st && (m_c != 0 || m_sp != 0)) n_start_clear++;
    sum = a + b + c;
    car = (sum >= 2) ? 1 : (sum <= -2) ? -1 : 0;
    dig = sum - 2 * car;
    if (car != 0) n_carry++;
    if (dig != 0 && sp != 0) begin
      if (dig == sp) begin n_adj_same++; car = dig; end
      else n_adj_opp++;
      dig = 0;
    end
    m_c  = car;
    m_sp = dig;
  endtask

  int prev_s;
  int t_first;

  initial begin
    foreach (row_seen[r]) row_seen[r] = 1'b0;
    build();
    rst_n = 1'b0; start = 1'b0; a_i = SPT_ZERO; b_i = SPT_ZERO;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n  = 1'b1;
    prev_s = 0;
    for (int t = 0; t < ncyc; t++) begin
      start = st_st[t];
      a_i   = enc(st_a[t]);
      b_i   = enc(st_b[t]);
      model_step(st_a[t], st_b[t], st_st[t]);
      #1;
      // Output digit of this cycle (combinational from the inputs and state).
      // In a start cycle it is s_{-1} = 0; the frame before then fits without
      // its top digit (checked below) or overflowed (top digit unchecked).
      if (st_st[t] && ex_chk[t] && ex_s[t] != 0) begin
        failures++;
        $display("FAIL cycle %0d: sum does not fit its frame", t);
      end
      if (ex_chk[t] || st_st[t]) begin
        checks++;
        if (dec(s_im1) != (st_st[t] ? 0 : ex_s[t])) begin
          failures++;
          if (failures < 20)
            $display("FAIL cycle %0d: s=%0d expected %0d", t, dec(s_im1), ex_s[t]);
        end
      end
      // s_first marks the first sum digit, one cycle after start.
      checks++;
      if (s_first != (t > 0 && st_st[t-1])) begin
        failures++;
        if (failures < 20) $display("FAIL cycle %0d: s_first=%0b", t, s_first);
      end
      // Canonic property of the output stream within a frame.
      if (!ex_new[t] && !st_st[t]) begin
        checks++;
        if (prev_s != 0 && dec(s_im1) != 0) begin
          failures++;
          if (failures < 20) $display("FAIL cycle %0d: two adjacent nonzero sum digits", t);
        end
      end
      prev_s = dec(s_im1);
      @(negedge clk);
    end
    $display("mechanisms: carry=%0d adjust_opposite=%0d adjust_same=%0d start_clear=%0d idle_gap=%0d overflow_frames=%0d",
             n_carry, n_adj_opp, n_adj_same, n_start_clear, n_gap, n_overflow);
    foreach (row_seen[r]) if (row_seen[r]) n_rows++;
    $display("truth table rows reached: %0d of %0d", n_rows, TABLE1_ROWS);
    if (n_rows != TABLE1_ROWS) begin failures++; $display("FAIL not every truth table row reached"); end
    if (n_carry == 0)       begin failures++; $display("FAIL no carry from a sum of +-2"); end
    if (n_adj_opp == 0)     begin failures++; $display("FAIL no opposite-sign adjustment"); end
    if (n_adj_same == 0)    begin failures++; $display("FAIL no same-sign adjustment"); end
    if (n_start_clear == 0) begin failures++; $display("FAIL no start pulse over leftover state"); end
    if (n_gap == 0)         begin failures++; $display("FAIL no idle gap between frames"); end
    if (n_overflow == 0)    begin failures++; $display("FAIL no overflowing frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
