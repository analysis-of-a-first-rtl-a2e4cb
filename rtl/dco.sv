// Digitally controlled oscillator (DCO).
//
// Divides its input clock, of rate N*f0, into reference pulses r(t). With no
// correction it emits one pulse every N input pulses, the nominal period T0.
// A correction c(k) from the loop filter shortens the current period by c(k)
// input pulses (or lengthens it when c(k) is negative), which realises the
// control law T(k+1) = T0 - c(k).
//
// How it works: a counter counts DCO input pulses since the last reference
// pulse, and a second register holds the correction received during the
// current period. The pulse fires on the input pulse at which the count
// reaches N minus the correction. A correction may arrive after the period
// has started (when the reference led the input, the error is known only
// at the input edge); it then moves the end of the period that is running.
// If the count is already past the new end, the pulse fires on the next
// input pulse. The period never drops below one input pulse. The counter
// structure is this design's choice; only the control law is fixed.
//
// Interface and timing: everything runs on clk; the N*f0 clock is the
// one-cycle enable dco_ce. r_pulse is high for one clk cycle, in the cycle
// after the dco_ce that ends the period. After reset the first pulse comes
// N input pulses after reset is released.
module dco
  import dpll_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  dco_ce,
  input  logic  c_valid,
  input  corr_t c_k,
  output logic  r_pulse
);

  localparam int unsigned CNT_W = CORR_W + 2;

  typedef logic signed [CNT_W:0] wide_t;

  logic [CNT_W-1:0] cnt;
  corr_t            corr;
  wide_t            corr_now;
  wide_t            term;
  wide_t            cnt_next;
  logic             fire;

  always_comb begin
    corr_now = wide_t'(corr) + (c_valid ? wide_t'(c_k) : wide_t'(0));
    term     = wide_t'(N) - corr_now;
    if (term < wide_t'(1)) term = wide_t'(1);
    cnt_next = wide_t'({1'b0, cnt}) + wide_t'(1);
    fire     = dco_ce && (cnt_next >= term);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      corr    <= '0;
      r_pulse <= 1'b0;
    end else begin
      r_pulse <= fire;
      if (fire) begin
        cnt  <= '0;
        corr <= '0;
      end else begin
        if (dco_ce && !(&cnt)) cnt <= cnt + 1'b1;
        if (c_valid) corr <= corr_t'(corr_now);
      end
    end
  end

endmodule
