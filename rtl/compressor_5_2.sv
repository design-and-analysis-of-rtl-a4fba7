// Exact 5:2 compressor built from three XOR-MUX full adders.
//
// Used in the high-significance columns of the approximate multiplier. Five
// bits of one column (x1..x5) and two carry-ins from the compressor of the
// next lower column become a sum bit (same weight), a carry bit and two
// carry-outs (one weight higher):
//   x1 + .. + x5 + cin1 + cin2 = sum + 2 * (carry + cout1 + cout2).
// Adder 1 compresses x1..x3 (gives cout1), adder 2 adds its sum to x4 and
// x5 (gives cout2), adder 3 adds the carry-ins. Neither carry-out depends on
// a carry-in, so chained compressors do not ripple. The design asks for an
// exact 5:2 compressor made of XOR-MUX adders; the three-adder arrangement
// is the standard one and is this implementation's choice.
// Purely combinational.
module compressor_5_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic x5,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);

  logic s1, s2;

  xor_mux_fa u_fa1 (.a(x1), .b(x2),   .cin(x3),   .sum(s1),  .cout(cout1));
  xor_mux_fa u_fa2 (.a(s1), .b(x4),   .cin(x5),   .sum(s2),  .cout(cout2));
  xor_mux_fa u_fa3 (.a(s2), .b(cin1), .cin(cin2), .sum(sum), .cout(carry));

endmodule
