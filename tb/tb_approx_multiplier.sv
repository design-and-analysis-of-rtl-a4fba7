// Self-checking testbench for approx_multiplier.
//
// Two instances: the default one (16x16, 8 OR-tree and 8 two-stage columns)
// and an exact one (no approximate columns). The exact instance must equal
// a*b. The default instance must equal an arithmetic reference model of the
// approximation, never exceed a*b, and be exact when one operand is a power
// of two (then every column holds at most one set bit). Directed corner
// operands come first, then random ones. It also reports the mean relative
// error of the default instance. Combinational block: each vector is applied
// and checked after a 1 ns settle time.
module tb_approx_multiplier;
  import approx_ref_pkg::*;

  localparam int N = 16;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p_apx, p_ex;

  int    checks = 0, failures = 0, n_inexact = 0, n_vec = 0;
  real   rel_err_sum = 0.0;
  bit    done = 0;

  approx_multiplier dut (.a(a), .b(b), .p(p_apx));
  approx_multiplier #(.N(N), .LOW_COLS(0), .MID_COLS(0)) dut_exact (.a(a), .b(b), .p(p_ex));

  task automatic check(input logic [N-1:0] va, input logic [N-1:0] vb);
    longint unsigned exact, model;
    a = va;
    b = vb;
    #1;
    exact = longint'(va) * longint'(vb);
    model = approx_ref(longint'(va), longint'(vb), N, 8, 8);
    n_vec++;
    checks++;
    if (longint'(p_ex) != exact) begin
      failures++;
      if (failures < 10) $display("exact  mismatch %0d*%0d: got %0d want %0d", va, vb, p_ex, exact);
    end
    checks++;
    if (longint'(p_apx) != model) begin
      failures++;
      if (failures < 10) $display("approx mismatch %0d*%0d: got %0d want %0d", va, vb, p_apx, model);
    end
    checks++;
    if (longint'(p_apx) > exact) begin
      failures++;
      $display("approx above exact %0d*%0d", va, vb);
    end
    if ($countones(va) == 1 || $countones(vb) == 1) begin
      checks++;
      if (longint'(p_apx) != exact) begin
        failures++;
        $display("power-of-two operand not exact %0d*%0d", va, vb);
      end
    end
    if (longint'(p_apx) != exact) n_inexact++;
    if (exact != 0) rel_err_sum += real'(exact - longint'(p_apx)) / real'(exact);
  endtask

  initial begin
    // directed corners
    check(16'h0000, 16'h0000);
    check(16'hFFFF, 16'hFFFF);
    check(16'hFFFF, 16'h0001);
    check(16'h8000, 16'h8000);
    check(16'h00FF, 16'h00FF);
    check(16'h1234, 16'h5678);
    for (int i = 0; i < N; i++) check(16'(1 << i), 16'($urandom));
    for (int i = 0; i < N; i++) check(16'($urandom), 16'(1 << i));
    // random
    for (int i = 0; i < 20000; i++) check(16'($urandom), 16'($urandom));
    // an operand with all ones meets the approximate compressors hardest
    for (int i = 0; i < 200; i++) check(16'hFFFF, 16'($urandom));
    // the approximation must actually be exercised
    checks++;
    if (n_inexact == 0) begin
      failures++;
      $display("approximation never changed a product");
    end
    $display("vectors=%0d inexact=%0d mean_relative_error=%e", n_vec, n_inexact,
             rel_err_sum / real'(n_vec));
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
