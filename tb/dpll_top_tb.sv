// End-to-end testbench of the closed loop, at the default parameters
// (N = 100, K = 1; the detector's saturation bound follows L = 50).
//
// The master clock runs at F = 2100 cycles per nominal period T0, so that
// both loop clocks can be made from it with phase accumulators: dco_ce at
// N*f0 and ted_ce at 2L*f0. Since L enters the loop only through the rate
// of the counting clock, one design instance covers every quantizing level L
// of the phase-step and frequency-step experiments. The input square wave has
// a period of Ti master cycles and a programmable first edge that sets e(0).
//
// Per run the testbench records every input rising edge, reference pulse and
// enable, pairs each reference pulse with its input edge, and checks:
//   1. each a(k) equals the signed count of counting pulses between the two
//      events, worked out here from the recorded enables;
//   2. each DCO period, in DCO input pulses, equals N - K a(k);
//   3. each step obeys e(k+1) = (1 - 2LK/N) e(k) + (T0 - Ti) to within the
//      quantization of one detector level and one DCO pulse;
//   4. per experiment: the final error of a phase step is within two DCO
//      pulses of zero; L = 50 locks in one step; a frequency step settles at
//      e_ss = N (T0 - Ti) / (2LK); an input frequency outside the lock range
//      makes the loop slip cycles; LK/N > 1 diverges.
// It counts how often each loop behaviour was seen (lead and lag intervals,
// one-step, monotonous and oscillatory locking, frequency-step steady state,
// cycle slipping, divergence) and fails any that never occurred.
module dpll_top_tb;
  import dpll_pkg::*;

  localparam int F  = 2100;
  localparam int NN = 100;
  localparam int KK = 1;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  ted_ce, dco_ce, s_in;
  logic  r_pulse, q, lead, lag, a_valid, c_valid;
  err_t  a_k;
  corr_t c_k;

  int checks = 0;
  int failures = 0;

  int n_lead = 0, n_lag = 0, n_one_step = 0, n_monotone = 0, n_oscillatory = 0;
  int n_freq_ss = 0, n_diverge = 0, n_slip = 0;

  dpll_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200_000_000;
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

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // recorded per run
  int ted_pref[$];   // ted_pref[c] = counting pulses in cycles 0..c-1
  int dco_pref[$];
  int s_times[$];
  int r_times[$];
  int a_vals[$];
  real e_t0[$];      // e(k) / T0

  // Runs the loop with counting rate 2L*f0, input period ti cycles, first
  // input edge e0 cycles before the first reference pulse, for np periods.
  task automatic run(input int l, input int ti, input int e0, input int np);
    int  dacc, tacc, cyc, ts0, t_first;
    bit  s_prev;
    ted_pref.delete(); dco_pref.delete(); s_times.delete(); r_times.delete();
    a_vals.delete(); e_t0.delete();
    rst_n = 1'b0; ted_ce = 1'b0; dco_ce = 1'b0; s_in = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    dacc = 0; tacc = 0; cyc = 0; s_prev = 1'b0;
    // the DCO's first pulse appears in cycle t_first (N pulses after reset,
    // plus the register stage)
    t_first = F;
    ts0 = t_first - e0;
    ted_pref.push_back(0);
    dco_pref.push_back(0);
    while (r_times.size() < np + 2 && cyc < (np + 4) * 2 * F) begin
      @(negedge clk);
      if (r_pulse) r_times.push_back(cyc);
      if (a_valid) a_vals.push_back(int'(a_k));
      // drive cycle cyc
      dacc += NN;
      dco_ce = (dacc >= F);
      if (dco_ce) dacc -= F;
      tacc += 2 * l;
      ted_ce = (tacc >= F);
      if (ted_ce) tacc -= F;
      s_in = (cyc >= ts0) && (((cyc - ts0) % ti) < ti / 2);
      if (s_in && !s_prev) s_times.push_back(cyc);
      s_prev = s_in;
      ted_pref.push_back(ted_pref[$] + int'(ted_ce));
      dco_pref.push_back(dco_pref[$] + int'(dco_ce));
      cyc++;
    end
    // the extra pulse only makes sure the input edge of the last kept one
    // has been seen
    if (r_times.size() > 0) void'(r_times.pop_back());
    while (a_vals.size() > r_times.size()) void'(a_vals.pop_back());
  endtask

  // Pairs events, checks a(k), the DCO periods and the difference equation.
  task automatic analyse(input int l, input int ti, input string name);
    real g;
    int  si;
    g  = 2.0 * real'(l) * real'(KK) / real'(NN);
    si = 0;
    for (int k = 0; k < r_times.size(); k++) begin
      int  rt, best, lo, hi, expa;
      rt = r_times[k];
      best = -1;
      foreach (s_times[j])
        if (absr(real'(s_times[j] - rt)) < real'(ti) / 2.0) best = s_times[j];
      if (best < 0) begin
        check(1'b0, {name, ": reference pulse without an input edge"});
        return;
      end
      e_t0.push_back(real'(rt - best) / real'(F));
      lo = (rt < best) ? rt : best;
      hi = (rt < best) ? best : rt;
      expa = ted_pref[hi + 1] - ted_pref[lo + 1];
      if (expa > 4 * L_DEFAULT) expa = 4 * L_DEFAULT;
      if (best > rt) expa = -expa;
      if (k < a_vals.size()) begin
        check(a_vals[k] == expa, {name, ": a(k) equals counted pulses"});
        if (a_vals[k] != expa) $display("  k=%0d a=%0d expected %0d", k, a_vals[k], expa);
        if (a_vals[k] > 0) n_lead++;
        if (a_vals[k] < 0) n_lag++;
      end
      if (k + 1 < r_times.size() && k < a_vals.size()) begin
        int ticks;
        ticks = dco_pref[r_times[k + 1]] - dco_pref[rt];
        check(ticks == NN - KK * a_vals[k], {name, ": period = N - K a(k)"});
        if (ticks != NN - KK * a_vals[k]) $display("  k=%0d ticks=%0d a=%0d", k, ticks, a_vals[k]);
      end
    end
    // difference equation (8), in units of T0
    for (int k = 0; k + 1 < e_t0.size(); k++) begin
      real pred, tol;
      pred = (1.0 - g) * e_t0[k] + (1.0 - real'(ti) / real'(F));
      tol  = real'(KK + 1) / real'(NN) + 2.0 / real'(F);
      check(absr(e_t0[k + 1] - pred) <= tol, {name, ": e(k+1) follows the loop equation"});
      if (absr(e_t0[k + 1] - pred) > tol)
        $display("  k=%0d e=%f pred=%f", k + 1, e_t0[k + 1], pred);
    end
    $write("%s: L=%0d Ti/T0=%.4f e(k)/T0 =", name, l, real'(ti) / real'(F));
    foreach (e_t0[k]) if (k < 8 || k == e_t0.size() - 1) $write(" %.3f", e_t0[k]);
    $write("\n");
  endtask

  task automatic phase_step(input int l, input real e0);
    string name;
    int    sign_changes;
    bit    one_step;
    name = $sformatf("phase step L=%0d e0=%.2f", l, e0);
    run(l, F, int'(e0 * F), 12);
    analyse(l, F, name);
    check(e_t0.size() == 13, {name, ": all periods seen"});
    check(absr(e_t0[$]) <= 2.0 / real'(NN), {name, ": error settles to zero"});
    sign_changes = 0;
    for (int k = 1; k < 4; k++)
      if ((e_t0[k] > 0.01 && e_t0[k - 1] < -0.01) || (e_t0[k] < -0.01 && e_t0[k - 1] > 0.01))
        sign_changes++;
    one_step = absr(e_t0[1]) <= 2.0 / real'(NN);
    if (l * KK * 2 == NN) begin
      check(one_step, {name, ": one-step locking"});
      if (one_step) n_one_step++;
    end else if (2 * l * KK < NN) begin
      check(sign_changes == 0 && !one_step, {name, ": monotonous locking"});
      if (sign_changes == 0 && !one_step) n_monotone++;
    end else begin
      check(sign_changes > 0, {name, ": oscillatory locking"});
      if (sign_changes > 0) n_oscillatory++;
    end
  endtask

  task automatic freq_step(input int l, input real fi_f0);
    string name;
    int    ti;
    real   ess, avg, g;
    name = $sformatf("frequency step L=%0d fi/f0=%.2f", l, fi_f0);
    ti = int'(real'(F) / fi_f0);
    g  = 2.0 * real'(l) * real'(KK) / real'(NN);
    run(l, ti, int'(0.1 * F), 24);
    analyse(l, ti, name);
    check(e_t0.size() == 25, {name, ": all periods seen"});
    ess = (1.0 - real'(ti) / real'(F)) / g;
    avg = 0.0;
    for (int k = e_t0.size() - 4; k < e_t0.size(); k++) avg += e_t0[k] / 4.0;
    check(absr(avg - ess) <= 0.04, {name, ": steady-state error"});
    check(absr(avg) < real'(ti) / real'(F) / 2.0, {name, ": e_ss inside (-Ti/2, Ti/2)"});
    $display("  e_ss/T0 measured %.3f, predicted %.3f", avg, ess);
    if (absr(avg - ess) <= 0.04) n_freq_ss++;
  endtask

  initial begin
    rst_n = 1'b0; ted_ce = 1'b0; dco_ce = 1'b0; s_in = 1'b0;
    // phase step, e(0) = 0.2 T0 (input leads), L = 20 .. 70
    phase_step(20, 0.2);
    phase_step(30, 0.2);
    phase_step(50, 0.2);
    phase_step(60, 0.2);
    phase_step(70, 0.2);
    // reference leading the input
    phase_step(50, -0.2);
    phase_step(30, -0.3);
    // frequency steps inside the lock range of each L
    freq_step(30, 0.75);
    freq_step(30, 1.25);
    freq_step(50, 0.6);
    freq_step(50, 0.9);
    freq_step(50, 1.1);
    freq_step(50, 1.4);
    freq_step(70, 0.8);
    freq_step(70, 1.2);
    // outside the lock range 1 - LK/N < fi/f0 < 1 + LK/N the loop slips
    // cycles: over the same window it gives fewer pulses than input edges
    begin
      run(30, int'(real'(F) / 1.45), int'(0.1 * F), 30);
      check(s_times.size() > r_times.size() + 2, "out of lock range: cycle slips");
      $display("out of lock range L=30 fi/f0=1.45: %0d input edges, %0d reference pulses",
               s_times.size(), r_times.size());
      if (s_times.size() > r_times.size() + 2) n_slip++;
    end
    // LK/N > 1: the error grows each step
    begin
      run(110, F, int'(0.1 * F), 3);
      analyse(110, F, "divergence L=110");
      check(e_t0.size() == 4, "divergence: periods seen");
      if (e_t0.size() == 4) begin
        check(absr(e_t0[3]) > absr(e_t0[2]) && absr(e_t0[2]) > absr(e_t0[1]) &&
              absr(e_t0[1]) > absr(e_t0[0]), "divergence: |e| grows");
        if (absr(e_t0[3]) > absr(e_t0[1])) n_diverge++;
      end
    end
    $display("mechanisms: lead=%0d lag=%0d one_step=%0d monotonous=%0d oscillatory=%0d freq_ss=%0d slip=%0d diverge=%0d",
             n_lead, n_lag, n_one_step, n_monotone, n_oscillatory, n_freq_ss, n_slip, n_diverge);
    check(n_lead > 0, "lead intervals seen");
    check(n_lag > 0, "lag intervals seen");
    check(n_one_step > 0, "one-step locking seen");
    check(n_monotone > 0, "monotonous locking seen");
    check(n_oscillatory > 0, "oscillatory locking seen");
    check(n_freq_ss > 0, "frequency-step steady state seen");
    check(n_diverge > 0, "divergence seen");
    check(n_slip > 0, "cycle slipping outside the lock range seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
