// Exact 4:2 compressor built from two XOR-MUX full adders.
//
// Four bits of one column (x1..x4) and a carry-in from the compressor of
// the next lower column are reduced to a sum bit (same weight), a carry bit
// and a carry-out (both one weight higher), so that
//   x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout).
// The first adder takes x1..x3 and gives cout; cout does not depend on cin,
// so a row of these compressors has no rippling carry. The second adder adds
// the first sum, x4 and cin. The design names this compressor; the two-adder
// structure is the usual one and is this implementation's choice.
// Purely combinational.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic s1;

  xor_mux_fa u_fa1 (.a(x1), .b(x2),  .cin(x3),  .sum(s1),  .cout(cout));
  xor_mux_fa u_fa2 (.a(s1), .b(x4),  .cin(cin), .sum(sum), .cout(carry));

endmodule
