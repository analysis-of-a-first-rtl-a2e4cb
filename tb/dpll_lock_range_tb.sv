// Lock-range testbench of the closed loop, at the default parameters
// (N = 100, K = 1).
//
// For several loop gains LK/N, set through the rate of the detector counting
// enable (2L*f0), the input frequency is placed just inside each edge of the
// lock range
//   1 - LK/N < fi/f0 < 1 + LK/N   for LK/N <= 1/2
//   LK/N < fi/f0 < 2 - LK/N       for LK/N >= 1/2
// and the loop is started from initial errors spread over most of an input
// period. Inside, the loop must lock from every start: after 30 periods
// the input edges and reference pulses come in equal numbers, and the
// error sits at e_ss = N (T0 - Ti) / (2LK). Just outside the range where no
// steady state fits inside (-Ti/2, Ti/2), the loop must slip cycles: over the
// same run the input gives noticeably more or fewer edges than the DCO gives
// pulses. The master clock runs at F = 2100 cycles per T0, as in the
// end-to-end test.
module dpll_lock_range_tb;
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
  int n_locked = 0, n_slipped = 0;

  dpll_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400_000_000;
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

  int s_times[$];
  int r_times[$];
  int run_end;

  // Runs np DCO periods (or the same time if the DCO stalls) with counting
  // rate 2L*f0 and input period ti; the first input edge comes e0 cycles
  // before the DCO's first pulse.
  task automatic run(input int l, input int ti, input int e0, input int np);
    int dacc, tacc, cyc, ts0;
    bit s_prev;
    s_times.delete(); r_times.delete();
    rst_n = 1'b0; ted_ce = 1'b0; dco_ce = 1'b0; s_in = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    dacc = 0; tacc = 0; cyc = 0; s_prev = 1'b0;
    ts0 = F - e0;
    while (cyc < (np + 1) * F) begin
      @(negedge clk);
      if (r_pulse) r_times.push_back(cyc);
      dacc += NN;
      dco_ce = (dacc >= F);
      if (dco_ce) dacc -= F;
      tacc += 2 * l;
      ted_ce = (tacc >= F);
      if (ted_ce) tacc -= F;
      s_in = (cyc >= ts0) && (((cyc - ts0) % ti) < ti / 2);
      if (s_in && !s_prev) s_times.push_back(cyc);
      s_prev = s_in;
      cyc++;
    end
    run_end = cyc;
  endtask

  // Number of input edges and reference pulses in the last `span` cycles.
  function automatic int count_after(ref int t[$], input int from);
    int n = 0;
    foreach (t[i]) if (t[i] >= from) n++;
    return n;
  endfunction

  task automatic expect_lock(input int l, input real fi_f0, input real e0_ti);
    int    ti, from, ns, nr, rt;
    real   ess, e_last;
    string name;
    ti = int'(real'(F) / fi_f0);
    name = $sformatf("L=%0d fi/f0=%.3f e(0)=%.2f Ti", l, fi_f0, e0_ti);
    run(l, ti, int'(e0_ti * ti), 40);
    from = 25 * F;
    ns = count_after(s_times, from);
    nr = count_after(r_times, from);
    check(ns - nr <= 1 && nr - ns <= 1, {name, ": locked, no cycle slips"});
    // error of the last reference pulse whose input edge lies inside the run,
    // against its nearest input edge
    rt = r_times[$];
    foreach (r_times[i]) if (r_times[i] + ti < run_end) rt = r_times[i];
    e_last = 1.0e9;
    foreach (s_times[i])
      if (absr(real'(s_times[i] - rt)) < absr(e_last)) e_last = real'(rt - s_times[i]);
    e_last = e_last / real'(F);
    ess = real'(NN) * (1.0 - real'(ti) / real'(F)) / (2.0 * real'(l) * real'(KK));
    check(absr(e_last - ess) <= 0.05, {name, ": steady-state error"});
    $display("%s: edges %0d pulses %0d, e/T0 %.3f, e_ss/T0 %.3f", name, ns, nr, e_last, ess);
    if (ns - nr <= 1 && nr - ns <= 1 && absr(e_last - ess) <= 0.05) n_locked++;
  endtask

  task automatic expect_slip(input int l, input real fi_f0);
    int    ti, ns, nr;
    string name;
    ti = int'(real'(F) / fi_f0);
    name = $sformatf("L=%0d fi/f0=%.3f", l, fi_f0);
    run(l, ti, int'(0.1 * ti), 40);
    ns = s_times.size();
    nr = r_times.size();
    check(ns - nr > 2 || nr - ns > 2, {name, ": cycle slips outside the lock range"});
    $display("%s (outside): edges %0d pulses %0d", name, ns, nr);
    if (ns - nr > 2 || nr - ns > 2) n_slipped++;
  endtask

  initial begin
    int  ls[5] = '{20, 30, 50, 60, 70};
    real starts[4] = '{-0.4, -0.1, 0.1, 0.4};
    rst_n = 1'b0; ted_ce = 1'b0; dco_ce = 1'b0; s_in = 1'b0;
    foreach (ls[i]) begin
      real g, lo, hi;
      g  = real'(ls[i]) * real'(KK) / real'(NN);
      lo = (g <= 0.5) ? 1.0 - g : g;
      hi = (g <= 0.5) ? 1.0 + g : 2.0 - g;
      foreach (starts[j]) begin
        expect_lock(ls[i], lo + 0.05, starts[j]);
        expect_lock(ls[i], hi - 0.05, starts[j]);
      end
      // no steady state inside (-Ti/2, Ti/2) beyond 1 +- LK/N
      expect_slip(ls[i], 1.0 - g - 0.05);
      expect_slip(ls[i], 1.0 + g + 0.05);
    end
    $display("locked runs %0d, slipping runs %0d", n_locked, n_slipped);
    check(n_locked > 0, "locking inside the range seen");
    check(n_slipped > 0, "slipping outside the range seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
