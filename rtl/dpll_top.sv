// First-order multilevel quantized digital phase-locked loop.
//
// The loop locks the reference pulses r(t) to the rising edges of the input
// square wave s(t). Once per period the timing error detector measures the
// time e(k) between the input edge and the reference pulse and quantizes it
// to a(k) = (2L/T0) e(k); the first-order filter scales it to
// c(k) = K a(k) DCO input pulses; the DCO shortens its next period by that
// amount, T(k+1) = T0 - c(k). The error therefore obeys the linear
// difference equation
//   e(k+1) = (1 - 2LK/N) e(k) + (T0 - Ti),
// which locks for 0 < LK/N < 1, locks in one step for LK/N = 1/2, and leaves
// the steady-state error e_ss = N (T0 - Ti) / (2LK) for an input period Ti
// differing from T0.
//
// Interface and timing: one clock, clk. The two loop clocks are one-cycle
// enables: ted_ce at 2L*f0 (the detector's counting clock) and dco_ce at
// N*f0 (the DCO input clock); clk must be at least as fast as either. s_in
// must be synchronous to clk. The internal loop signals (Q, LEAD, LAG, a(k),
// c(k)) are brought out for observation. Using clock enables on one clock
// instead of two free-running clocks is this design's choice.
module dpll_top
  import dpll_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned L = L_DEFAULT,
  parameter int          K = K_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ted_ce,
  input  logic  dco_ce,
  input  logic  s_in,
  output logic  r_pulse,
  output logic  q,
  output logic  lead,
  output logic  lag,
  output logic  a_valid,
  output err_t  a_k,
  output logic  c_valid,
  output corr_t c_k
);

  ted #(.L(L)) u_ted (
    .clk     (clk),
    .rst_n   (rst_n),
    .ted_ce  (ted_ce),
    .s_in    (s_in),
    .r_pulse (r_pulse),
    .q       (q),
    .lead    (lead),
    .lag     (lag),
    .a_valid (a_valid),
    .a_k     (a_k)
  );

  loop_filter #(.K(K)) u_filter (
    .clk     (clk),
    .rst_n   (rst_n),
    .a_valid (a_valid),
    .a_k     (a_k),
    .c_valid (c_valid),
    .c_k     (c_k)
  );

  dco #(.N(N)) u_dco (
    .clk     (clk),
    .rst_n   (rst_n),
    .dco_ce  (dco_ce),
    .c_valid (c_valid),
    .c_k     (c_k),
    .r_pulse (r_pulse)
  );

endmodule
