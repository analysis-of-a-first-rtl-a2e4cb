// First-order digital loop filter, D(z) = K.
//
// Turns the TED output a(k), in units of T0/(2L), into the DCO period
// correction c(k) = K * a(k), in units of T0/N (DCO input clock pulses). With
// the two unit conversions this is exactly c(k) = (2L/N) K e(k) of the
// first-order loop. The result saturates at the range of corr_t.
//
// Interface and timing: one register stage; c_valid/c_k follow
// a_valid/a_k one clk cycle later. The single-register pipeline and the
// saturation are this design's choices.
module loop_filter
  import dpll_pkg::*;
#(
  parameter int K = K_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  a_valid,
  input  err_t  a_k,
  output logic  c_valid,
  output corr_t c_k
);

  localparam int PROD_W = ERR_W + 32;

  logic signed [PROD_W-1:0] prod;
  corr_t                    c_sat;

  always_comb begin
    prod = PROD_W'(a_k) * PROD_W'(K);
    if (prod > PROD_W'(CORR_MAX))      c_sat = CORR_MAX;
    else if (prod < PROD_W'(CORR_MIN)) c_sat = CORR_MIN;
    else                               c_sat = corr_t'(prod);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_valid <= 1'b0;
      c_k     <= '0;
    end else begin
      c_valid <= a_valid;
      if (a_valid) c_k <= c_sat;
    end
  end

endmodule
