// Self-checking testbench for the DCO.
//
// The N*f0 enable is driven at random. Periods are run with no correction,
// with a correction that arrives just after the period starts (as after a
// lead), with one that arrives in mid-period (as after a lag), with two in
// one period, and with one that arrives after the shortened end has already
// passed. A reference model kept here counts DCO input pulses since the last
// reference pulse and sums the corrections of the period; a pulse is due on
// the input pulse at which the count reaches max(1, N - sum), and r_pulse must
// be high in the following cycle and in no other. Period lengths are also
// checked directly against N - c.
module dco_tb;
  import dpll_pkg::*;

  localparam int unsigned N = 100;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  dco_ce;
  logic  c_valid;
  corr_t c_k;
  logic  r_pulse;

  int checks = 0;
  int failures = 0;

  dco #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
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

  // model state
  int  m_cnt = 0;
  int  m_sum = 0;
  bit  m_fire_d = 1'b0;
  int  periods = 0;

  // Runs one period: correction value c arrives when the model count reaches
  // at_tick (no correction when at_tick < 0). Returns the period in ticks.
  task automatic period(input int c, input int at_tick, input int ce_pct, output int ticks);
    bit done;
    bit sent;
    done = 1'b0;
    sent = 1'b0;
    ticks = 0;
    while (!done) begin
      @(negedge clk);
      check(r_pulse == m_fire_d, "r_pulse matches model");
      if (m_fire_d) begin
        done = 1'b1;
        m_fire_d = 1'b0;
        c_valid = 1'b0;
        dco_ce = 1'b0;
        break;
      end
      dco_ce  = (($urandom % 100) < ce_pct);
      c_valid = (!sent && at_tick >= 0 && m_cnt >= at_tick);
      c_k     = corr_t'(c);
      if (c_valid) begin
        sent = 1'b1;
        m_sum += c;
      end
      if (dco_ce) begin
        int term;
        term = N - m_sum;
        if (term < 1) term = 1;
        ticks++;
        if (m_cnt + 1 >= term) begin
          m_fire_d = 1'b1;
          m_cnt = 0;
          m_sum = 0;
        end else begin
          m_cnt++;
        end
      end
    end
    periods++;
  endtask

  initial begin
    int t;
    rst_n = 1'b0; dco_ce = 1'b0; c_valid = 1'b0; c_k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // first period after reset and free running
    period(0, -1, 100, t); check(t == N, "free period N");
    period(0, -1, 50, t);  check(t == N, "free period N, sparse enable");
    // lead-like: positive correction right after the start
    period(20, 0, 100, t); check(t == N - 20, "shortened period");
    // lag-like: negative correction mid-period
    period(-30, 40, 70, t); check(t == N + 30, "lengthened period");
    // late correction: end already passed, fires on the next input pulse
    period(50, 80, 100, t); check(t == 81, "late correction fires at once");
    // random mix
    for (int i = 0; i < 300; i++) begin
      int c, at;
      c  = int'($urandom % 121) - 60;
      at = int'($urandom % 40);
      period(c, at, 30 + int'($urandom % 71), t);
      check(t == N - c, "period N - c");
    end
    $display("periods run: %0d", periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
