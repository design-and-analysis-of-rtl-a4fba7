// End-to-end testbench for fir_filter at its default parameters (8 taps,
// 16-bit samples and coefficients, 8 OR-tree and 8 two-stage columns).
//
// A sample is driven each clock. The testbench keeps its own history of the
// inputs and, after each clock edge, expects
//   Y = sum_k approx_ref(x[n-k], COEF[k])
// where approx_ref is the arithmetic model of the approximate multiplier;
// this checks the delay line, the one-clock latency and the adder chain.
// Each output is also checked against the exact filter sum (never above
// it). The run covers, and counts:
//   resets      a reset in the middle of a stream clears the delay line
//   impulses    a unit impulse reproduces the coefficients exactly
//   inexact     outputs where the approximation changed the result
//   full_scale  all-ones input samples (largest products)
// A mechanism that never happened counts as a failure.
module tb_fir_filter;
  import approx_ref_pkg::*;

  localparam int N    = 16;
  localparam int TAPS = 8;
  localparam int YW   = 2 * N + $clog2(TAPS);

  logic          clk = 1'b0;
  logic          rst;
  logic [N-1:0]  X;
  logic [YW-1:0] Y;

  fir_filter dut (.clk(clk), .rst(rst), .X(X), .Y(Y));

  always #5 clk = ~clk;

  logic [N-1:0] hist [TAPS];   // hist[k] = x[n-k], zero after reset
  int checks = 0, failures = 0;
  int n_reset = 0, n_impulse = 0, n_inexact = 0, n_full = 0, n_out = 0;
  bit done = 0;

  function automatic longint unsigned want_apx();
    longint unsigned acc = 0;
    for (int k = 0; k < TAPS; k++)
      acc += approx_ref(longint'(hist[k]), longint'(dut.COEF[k]), N, 8, 8);
    return acc;
  endfunction

  function automatic longint unsigned want_exact();
    longint unsigned acc = 0;
    for (int k = 0; k < TAPS; k++) acc += longint'(hist[k]) * longint'(dut.COEF[k]);
    return acc;
  endfunction

  // Drive one sample (or a reset) through one clock edge and check Y.
  task automatic step(input logic [N-1:0] x, input bit do_rst);
    longint unsigned wa, we;
    @(negedge clk);
    X   = x;
    rst = do_rst;
    @(posedge clk);
    if (do_rst) begin
      for (int k = 0; k < TAPS; k++) hist[k] = '0;
      wa = 0;
      we = 0;
    end else begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      wa = want_apx();
      we = want_exact();
    end
    #1;
    checks++;
    n_out++;
    if (longint'(Y) != wa) begin
      failures++;
      if (failures < 10) $display("t=%0t: Y=%0d, model %0d (exact %0d)", $time, Y, wa, we);
    end
    checks++;
    if (longint'(Y) > we) begin
      failures++;
      $display("t=%0t: Y=%0d above the exact sum %0d", $time, Y, we);
    end
    if (longint'(Y) != we) n_inexact++;
  endtask

  initial begin
    X   = '0;
    rst = 1'b1;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    // reset, then a unit impulse: Y must walk through COEF[0..TAPS-1]
    step('0, 1'b1);
    step(16'd1, 1'b0);
    for (int k = 1; k < TAPS + 2; k++) step('0, 1'b0);
    // check the impulse response directly too
    step('0, 1'b1);
    step(16'd1, 1'b0);
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (longint'(Y) != longint'(dut.COEF[k])) begin
        failures++;
        $display("impulse response tap %0d: Y=%0d want %0d", k, Y, dut.COEF[k]);
      end
      n_impulse++;
      step('0, 1'b0);
    end
    // random stream
    for (int i = 0; i < 400; i++) step(16'($urandom), 1'b0);
    // full-scale samples
    for (int i = 0; i < 2 * TAPS; i++) begin
      step('1, 1'b0);
      n_full++;
    end
    // reset in the middle of a stream, then more random samples
    step('0, 1'b1);
    n_reset++;
    checks++;
    if (Y != '0) begin
      failures++;
      $display("Y not cleared by reset");
    end
    for (int i = 0; i < 200; i++) step(16'($urandom), 1'b0);
    // every mechanism must have been exercised
    checks += 4;
    if (n_reset == 0)   begin failures++; $display("no mid-stream reset"); end
    if (n_impulse == 0) begin failures++; $display("no impulse"); end
    if (n_inexact == 0) begin failures++; $display("approximation never showed"); end
    if (n_full == 0)    begin failures++; $display("no full-scale input"); end
    $display("outputs=%0d resets=%0d impulses=%0d inexact=%0d full_scale=%0d",
             n_out, n_reset, n_impulse, n_inexact, n_full);
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 2000 clock periods
  initial begin
    #20000;
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
