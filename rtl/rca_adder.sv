// Carry-propagate (ripple-carry) adder made of XOR-MUX full adders.
//
// Adds two W-bit words and a carry-in: {cout, s} = a + b + cin. Bit i is one
// xor_mux_fa whose carry-out feeds bit i+1. It is the final carry-propagate
// adder of the multiplier and the adder of each FIR tap. The design asks for
// a carry-propagate adder from XOR-MUX full adders; choosing a plain ripple
// chain is this implementation's choice. Purely combinational; the delay
// grows linearly with W.
module rca_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  // Each bit keeps its carry in its own generate scope, so the chain is a
  // list of separate nets rather than one vector feeding itself.
  for (genvar i = 0; i < W; i++) begin : g_bit
    logic ci, co;
    if (i == 0) begin : g_first
      assign ci = cin;
    end else begin : g_next
      assign ci = g_bit[i-1].co;
    end
    xor_mux_fa u_fa (.a(a[i]), .b(b[i]), .cin(ci), .sum(s[i]), .cout(co));
  end

  assign cout = g_bit[W-1].co;

endmodule
