// Multilevel quantized timing error detector (TED).
//
// Measures, once per input period, the time between the rising edge of the
// input square wave s(t) and the reference pulse r(t) from the DCO, and
// quantizes it in steps of T0/(2L): a(k) = (2L/T0) e(k).
//
// How it works: a single flip-flop Q is toggled by every input rising edge and
// every reference pulse, so it is high from whichever of the two comes first
// until the other one arrives. Two AND gates split that interval:
//   LEAD = s AND Q   (the input edge came first; s is already high)
//   LAG  = ~s AND Q  (the reference pulse came first; s is still low)
// The LEAD and LAG signals gate the TED counting clock, whose rate is 2L*f0,
// and the gated pulses are counted. When Q falls, a(k) = LEAD count - LAG
// count is presented for one cycle on a_k with a_valid, and the counters are
// cleared. The flip-flop and the two gates are the structure the loop is
// built on; counting the gated pulses into a signed binary word inside the
// detector is this design's choice (the pulse bursts themselves are what the
// detector emits in the original scheme).
//
// Interface and timing: everything runs on clk. The 2L*f0 counting clock is a
// one-cycle enable, ted_ce. s_in must be synchronous to clk; the gates use
// s as registered alongside Q, so a lead and a lag of the same length give
// counts of the same size. a_valid rises the cycle after the event that
// closes the interval. An input edge and a
// reference pulse in the same cycle give a(k) = 0. Each count saturates at
// 4L, twice the largest error the loop meets inside its lock range.
module ted
  import dpll_pkg::*;
#(
  parameter int unsigned L = L_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ted_ce,
  input  logic s_in,
  input  logic r_pulse,
  output logic q,
  output logic lead,
  output logic lag,
  output logic a_valid,
  output err_t a_k
);

  localparam int unsigned CNT_MAX = 4 * L;
  localparam int unsigned CNT_W   = $clog2(CNT_MAX + 2);

  typedef logic [CNT_W-1:0] cnt_t;

  logic s_d;
  logic s_rise;
  logic toggle;
  logic close;
  cnt_t lead_cnt, lag_cnt;
  cnt_t lead_tot, lag_tot;

  assign s_rise = s_in & ~s_d;
  assign toggle = s_rise ^ r_pulse;

  // LEAD and LAG gates of the detector.
  // s_d is s(t) sampled on the same clock edge as Q, so both gates see the
  // interval on the same cycles whichever event opened it.
  assign lead = s_d & q;
  assign lag  = ~s_d & q;

  // The interval ends on the second of the two events; two events in one
  // cycle with Q low are a zero-length interval.
  assign close = (q & (s_rise | r_pulse)) | (~q & s_rise & r_pulse);

  // Counts including the pulse of this cycle, saturating.
  always_comb begin
    lead_tot = lead_cnt;
    lag_tot  = lag_cnt;
    if (ted_ce && lead && lead_cnt < cnt_t'(CNT_MAX)) lead_tot = lead_cnt + 1'b1;
    if (ted_ce && lag  && lag_cnt  < cnt_t'(CNT_MAX)) lag_tot  = lag_cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_d      <= 1'b0;
      q        <= 1'b0;
      lead_cnt <= '0;
      lag_cnt  <= '0;
      a_valid  <= 1'b0;
      a_k      <= '0;
    end else begin
      s_d     <= s_in;
      q       <= q ^ toggle;
      a_valid <= close;
      if (close) begin
        a_k      <= err_t'(lead_tot) - err_t'(lag_tot);
        lead_cnt <= '0;
        lag_cnt  <= '0;
      end else begin
        lead_cnt <= lead_tot;
        lag_cnt  <= lag_tot;
      end
    end
  end

endmodule
