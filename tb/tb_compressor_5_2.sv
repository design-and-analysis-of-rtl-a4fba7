// Exhaustive testbench for compressor_5_2: for all 128 input combinations
// sum + 2*(carry + cout1 + cout2) must equal the number of ones on x1..x5,
// cin1 and cin2, and neither carry-out may depend on the carry-ins.
module tb_compressor_5_2;
  logic [4:0] x;
  logic [1:0] ci;
  logic       sum, carry, cout1, cout2;
  logic [1:0] co_ref;
  int         checks = 0, failures = 0;
  bit         done = 0;

  compressor_5_2 dut (.x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .x5(x[4]),
                      .cin1(ci[0]), .cin2(ci[1]),
                      .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  initial begin
    for (int v = 0; v < 32; v++) begin
      x  = 5'(v);
      ci = 2'b00;
      #1;
      co_ref = {cout2, cout1};
      for (int c = 0; c < 4; c++) begin
        ci = 2'(c);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2)) != $countones({x, ci})) begin
          failures++;
          $display("x=%b ci=%b: sum=%b carry=%b cout=%b%b", x, ci, sum, carry, cout2, cout1);
        end
        checks++;
        if ({cout2, cout1} != co_ref) begin
          failures++;
          $display("carry-out depends on carry-in for x=%b", x);
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
