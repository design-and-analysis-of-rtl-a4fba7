// OR-tree based approximate 5:2 compressor for the low-significance columns.
//
// The inputs are taken as two pairs and a single bit. A pair that is 11 sets
// the carry (weight 2); a pair that is 01 or 10, or the single bit x5, sets
// the sum (weight 1). Sum and carry are each an OR tree:
//   sum   = (x1 ^ x2) | (x3 ^ x4) | x5
//   carry = (x1 & x2) | (x3 & x4)
// Where several terms of one OR are set, their weights are lost, so
// sum + 2*carry never exceeds the true number of ones; it is exact when at
// most one input is set, and for any single pair. No carry-in or carry-out.
// The design names an OR-tree based, area-efficient inexact 5:2 compressor
// for the lowest weights without giving its gates; these equations are this
// implementation's choice. Purely combinational.
module compressor_5_2_or (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic x5,
  output logic sum,
  output logic carry
);

  assign sum   = (x1 ^ x2) | (x3 ^ x4) | x5;
  assign carry = (x1 & x2) | (x3 & x4);

endmodule
