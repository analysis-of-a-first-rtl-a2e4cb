// Self-checking testbench for the timing error detector.
//
// Each trial drives one input rising edge and one reference pulse a chosen
// number of clk cycles apart, input first (lead) or reference first (lag),
// with the 2L*f0 counting enable toggling at random. The expected a(k) is
// worked out here from the same stimulus: the number of counting enables in
// the cycles after the opening event up to and including the closing event,
// positive for lead and negative for lag, saturating at 4L. The testbench checks the value, that
// a_valid comes exactly one cycle after the closing event and only then, and
// the Q, LEAD and LAG gate outputs during the interval. Coincident events
// must give a(k) = 0.
module ted_tb;
  import dpll_pkg::*;

  localparam int unsigned L = 50;

  logic clk = 1'b0;
  logic rst_n;
  logic ted_ce, s_in, r_pulse;
  logic q, lead, lag, a_valid;
  err_t a_k;

  int checks = 0;
  int failures = 0;

  ted #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One trial: opening event at cycle 5, closing event gap cycles later,
  // s stays high until cycle 5 + gap + 5 (lead) or rises at the closing event (lag).
  task automatic trial(input bit is_lead, input int gap, input int ce_pct);
    int open_c, close_c, len;
    int exp_cnt;
    int valid_seen;
    open_c  = 5;
    close_c = 5 + gap;
    len     = close_c + 12;
    exp_cnt = 0;
    valid_seen = 0;
    for (int c = 0; c < len; c++) begin
      @(negedge clk);
      // check the registered result of the previous cycle
      if (c == close_c + 1) begin
        check(a_valid == 1'b1, "a_valid after close");
        check(a_k == (is_lead ? err_t'(exp_cnt) : -err_t'(exp_cnt)), "a(k) value");
        if (a_k != (is_lead ? err_t'(exp_cnt) : -err_t'(exp_cnt)))
          $display("  lead=%0b gap=%0d expected %0d got %0d", is_lead, gap, exp_cnt, a_k);
      end else if (a_valid) begin
        valid_seen++;
      end
      // drive this cycle
      ted_ce = (($urandom % 100) < ce_pct);
      if (is_lead) begin
        s_in    = (c >= open_c) && (c < close_c + 5);
        r_pulse = (c == close_c);
      end else begin
        s_in    = (c >= close_c) && (c < close_c + 5 + gap);
        r_pulse = (c == open_c);
      end
      if (gap == 0) r_pulse = (c == open_c);
      if (c > open_c && c <= close_c && ted_ce && exp_cnt < 4 * L) exp_cnt++;
      // gate outputs during the interval (Q is high after the opening cycle)
      #1;
      if (c > open_c && c <= close_c) begin
        check(q == 1'b1, "Q high in interval");
        check(lead == is_lead && lag == !is_lead, "LEAD/LAG gate");
      end else if (c < open_c || c > close_c) begin
        check(q == 1'b0 && !lead && !lag, "Q low outside interval");
      end
    end
    check(valid_seen == 0, "no spurious a_valid");
  endtask

  initial begin
    rst_n = 1'b0; ted_ce = 1'b0; s_in = 1'b0; r_pulse = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    trial(1'b1, 10, 100);
    trial(1'b0, 10, 100);
    trial(1'b1, 0, 100);
    for (int i = 0; i < 200; i++)
      trial(i[0], 1 + int'($urandom % 90), 20 + int'($urandom % 81));
    // saturation: a gap far longer than 4L counting pulses
    trial(1'b1, 4 * L + 30, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
