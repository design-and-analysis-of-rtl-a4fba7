// Exhaustive testbench for compressor_4_2: for all 32 input combinations the
// weighted outputs sum + 2*(carry + cout) must equal the number of ones on
// x1..x4 and cin, and cout must not depend on cin (no rippling carry).
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout, cout0;
  int   checks = 0, failures = 0;
  bit   done = 0;

  compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x4, x3, x2, x1} = 4'(v);
      cin = 1'b0;
      #1;
      cout0 = cout;
      for (int ci = 0; ci < 2; ci++) begin
        cin = 1'(ci);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones({x1, x2, x3, x4, cin})) begin
          failures++;
          $display("inputs %b%b%b%b cin=%b: sum=%b carry=%b cout=%b", x1, x2, x3, x4, cin, sum, carry, cout);
        end
        checks++;
        if (cout != cout0) begin
          failures++;
          $display("cout depends on cin for %b%b%b%b", x1, x2, x3, x4);
        end
      end
    end
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
