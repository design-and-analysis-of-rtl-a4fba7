// Exhaustive testbench for xor_mux_fa: all eight input combinations are
// compared with the binary sum a + b + cin (the full-adder truth table).
module tb_xor_mux_fa;
  logic a, b, cin, sum, cout;
  int   checks = 0, failures = 0;
  bit   done = 0;

  xor_mux_fa dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cin, a, b} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("a=%b b=%b cin=%b: got cout=%b sum=%b", a, b, cin, cout, sum);
      end
    end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
