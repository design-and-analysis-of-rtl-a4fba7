// Exhaustive testbench for compressor_5_2_or. Expected outputs come from
// counting: a pair (x1,x2) or (x3,x4) holding exactly one 1, or x5 = 1,
// sets the sum; a pair holding two 1s sets the carry. It also checks that
// the result never exceeds the true count and is exact for at most one set
// input, and that some combinations are approximate.
module tb_compressor_5_2_or;
  logic [4:0] x;
  logic       sum, carry;
  int         checks = 0, failures = 0, n_apx = 0;
  int         p1, p2, cnt, val;
  bit         done = 0;

  compressor_5_2_or dut (.x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .x5(x[4]),
                         .sum(sum), .carry(carry));

  initial begin
    for (int v = 0; v < 32; v++) begin
      x = 5'(v);
      #1;
      p1  = int'(x[0]) + int'(x[1]);
      p2  = int'(x[2]) + int'(x[3]);
      cnt = $countones(x);
      val = int'(sum) + 2 * int'(carry);
      checks++;
      if (sum != (p1 == 1 || p2 == 1 || x[4]) || carry != (p1 == 2 || p2 == 2)) begin
        failures++;
        $display("x=%b: sum=%b carry=%b", x, sum, carry);
      end
      checks++;
      if (val > cnt || (cnt <= 1 && val != cnt)) begin
        failures++;
        $display("x=%b: value %0d for count %0d", x, val, cnt);
      end
      if (val != cnt) n_apx++;
    end
    checks++;
    if (n_apx == 0) failures++;
    $display("approximate combinations: %0d of 32", n_apx);
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
