// Exhaustive testbench for compressor_5_2_approx. For each of the 32 input
// combinations the expected outputs are worked out from the compressor's
// definition: n3 = x1+x2+x3, then t = (n3 mod 2) + x4 + x5; sum = t mod 2;
// carry = 1 when n3 >= 2 or t >= 2. The testbench also checks the stated
// properties: the result never exceeds the count, and is exact for counts
// up to three. It counts how many combinations are approximate (there must
// be some).
module tb_compressor_5_2_approx;
  logic [4:0] x;
  logic       sum, carry;
  int         checks = 0, failures = 0, n_apx = 0;
  int         n3, t, cnt, val;
  bit         done = 0;

  compressor_5_2_approx dut (.x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .x5(x[4]),
                             .sum(sum), .carry(carry));

  initial begin
    for (int v = 0; v < 32; v++) begin
      x = 5'(v);
      #1;
      n3  = int'(x[0]) + int'(x[1]) + int'(x[2]);
      t   = n3 % 2 + int'(x[3]) + int'(x[4]);
      cnt = $countones(x);
      val = int'(sum) + 2 * int'(carry);
      checks++;
      if (sum != 1'(t % 2) || carry != (n3 >= 2 || t >= 2)) begin
        failures++;
        $display("x=%b: sum=%b carry=%b", x, sum, carry);
      end
      checks++;
      if (val > cnt || (cnt <= 3 && val != cnt)) begin
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
