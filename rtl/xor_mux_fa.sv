// XOR-MUX full adder.
//
// The sum is two cascaded XOR gates, sum = (a ^ b) ^ cin. The carry is a
// 2:1 multiplexer steered by the first XOR: when a and b differ the carry
// out equals cin, when they agree it equals a (which then equals b):
//   cout = (a & ~(a ^ b)) | (cin & (a ^ b)).
// Two XOR gates and one multiplexer replace the AND-OR carry logic of a
// standard full adder. This structure is the one the design specifies.
// Purely combinational, no clock.
module xor_mux_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;  // propagate, the multiplexer select

  assign p    = a ^ b;
  assign sum  = p ^ cin;
  assign cout = p ? cin : a;

endmodule
