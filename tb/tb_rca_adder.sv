// Testbench for rca_adder at its default width (32 bits): corner operands
// (carry through every bit, all ones) and random operands, each compared
// with the integer sum a + b + cin including the carry-out.
module tb_rca_adder;
  localparam int W = 32;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int           checks = 0, failures = 0;
  bit           done = 0;

  rca_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check(input logic [W-1:0] va, input logic [W-1:0] vb, input logic vc);
    logic [W:0] want;
    a = va; b = vb; cin = vc;
    #1;
    want = {1'b0, va} + {1'b0, vb} + (W+1)'(vc);
    checks++;
    if ({cout, s} != want) begin
      failures++;
      if (failures < 10) $display("%h + %h + %b: got %h want %h", va, vb, vc, {cout, s}, want);
    end
  endtask

  initial begin
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check('0, '0, 1'b0);
    check(32'h8000_0000, 32'h8000_0000, 1'b0);
    check(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    for (int i = 0; i < 5000; i++) check($urandom, $urandom, 1'($urandom));
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
