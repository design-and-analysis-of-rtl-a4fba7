// Two-stage approximate 5:2 compressor for the medium-significance columns.
//
// Stage 1 is an XOR-MUX full adder on x1..x3 (sum s1, carry c1). Stage 2 is
// a second XOR-MUX full adder on s1, x4 and x5 (sum, carry c2). The exact
// result would need a third output of weight 4 when both c1 and c2 are set;
// this compressor keeps only two outputs and merges the two carries with an
// OR gate:
//   sum   = s1 ^ x4 ^ x5          (exact)
//   carry = c1 | c2               (drops 2 when c1 = c2 = 1)
// So the result sum + 2*carry never exceeds the true count, and it is exact
// whenever at most three inputs are set. It has no carry-in or carry-out, so
// columns built from it are independent of each other. The design names a
// two-stage approximate 5:2 compressor without giving its gates; this
// structure is this implementation's choice. Purely combinational.
module compressor_5_2_approx (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic x5,
  output logic sum,
  output logic carry
);

  logic s1, c1, c2;

  xor_mux_fa u_st1 (.a(x1), .b(x2), .cin(x3), .sum(s1),  .cout(c1));
  xor_mux_fa u_st2 (.a(s1), .b(x4), .cin(x5), .sum(sum), .cout(c2));

  assign carry = c1 | c2;

endmodule
