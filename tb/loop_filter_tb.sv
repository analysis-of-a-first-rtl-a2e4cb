// Self-checking testbench for the first-order loop filter.
//
// Two instances, the default gain K = 1 and K = 3, receive the same random
// stream of a(k) words, some of them large enough to saturate the K = 3
// output. Each c(k) is compared with K*a(k) clipped to the 16-bit signed range,
// computed here, one cycle after a_valid; c_valid must follow a_valid with
// exactly one cycle of latency.
module loop_filter_tb;
  import dpll_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  a_valid;
  err_t  a_k;
  logic  c_valid1, c_valid3;
  corr_t c_k1, c_k3;

  int checks = 0;
  int failures = 0;

  loop_filter dut1 (.clk, .rst_n, .a_valid, .a_k, .c_valid(c_valid1), .c_k(c_k1));
  loop_filter #(.K(3)) dut3 (.clk, .rst_n, .a_valid, .a_k, .c_valid(c_valid3), .c_k(c_k3));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic corr_t clip(input longint v);
    if (v > 32767) return corr_t'(32767);
    if (v < -32768) return corr_t'(-32768);
    return corr_t'(v);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    bit    prev_valid;
    err_t  prev_a;
    rst_n = 1'b0; a_valid = 1'b0; a_k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    prev_valid = 1'b0;
    prev_a = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(c_valid1 == prev_valid && c_valid3 == prev_valid, "c_valid latency");
      if (prev_valid) begin
        check(c_k1 == clip(longint'(prev_a)), "c(k) = a(k) for K=1");
        check(c_k3 == clip(3 * longint'(prev_a)), "c(k) = 3 a(k) for K=3");
      end
      a_valid = ($urandom % 3) == 0;
      if (i % 10 == 0) a_k = err_t'($urandom);
      else a_k = err_t'(int'($urandom % 401) - 200);
      prev_valid = a_valid;
      prev_a = a_k;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
