// Direct-form FIR filter built from approximate multipliers and XOR-MUX
// adders.
//
// Each tap k is a delay element, a multiplier and an adder: the sample that
// arrived k clocks ago, x[n-k], is multiplied by the constant coefficient
// COEF[k] in an approx_multiplier, and the products are summed by a chain of
// rca_adder instances (XOR-MUX full adders). The output register is loaded
// every clock, so
//   Y (after the clock edge that samples X = x[n]) = sum_k COEF[k] * x[n-k]
// with each product taken from the approximate multiplier: one sample in and
// one result out per clock, one clock of latency. Samples and coefficients
// are unsigned N-bit numbers; Y is 2N + clog2(TAPS) bits wide, so the sum
// cannot overflow. rst is synchronous and active high; it clears the delay
// line and Y.
//
// The ports clk, rst, X and Y, the tap structure (delay, multiplier, adder)
// and the use of the 16x16 approximate multiplier and XOR-MUX adders follow
// the design. The number of taps, the coefficient values, unsigned
// arithmetic, the output register and the reset style are this
// implementation's own choices.
module fir_filter #(
  parameter int unsigned N        = 16,
  parameter int unsigned TAPS     = 8,
  parameter int unsigned LOW_COLS = 8,
  parameter int unsigned MID_COLS = 8,
  // Symmetric low-pass coefficients, COEF[k] multiplies x[n-k]. The default
  // holds eight entries: override COEF whenever TAPS is changed.
  parameter logic [TAPS-1:0][N-1:0] COEF = {
    16'd1311, 16'd3932, 16'd7209, 16'd9830,
    16'd9830, 16'd7209, 16'd3932, 16'd1311
  },
  localparam int unsigned YW = 2 * N + $clog2(TAPS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  X,
  output logic [YW-1:0] Y
);

  // Tap inputs: tap 0 is the incoming sample, tap k the sample k clocks old.
  logic [TAPS-1:0][N-1:0] tap;
  logic [TAPS-1:1][N-1:0] dly;

  always_ff @(posedge clk) begin
    if (rst) begin
      dly <= '0;
    end else begin
      dly[1] <= X;
      for (int k = 2; k < TAPS; k++) dly[k] <= dly[k-1];
    end
  end

  assign tap[0] = X;
  for (genvar k = 1; k < TAPS; k++) begin : g_tap
    assign tap[k] = dly[k];
  end

  // One multiplier and one adder per tap; the adders form a chain, each
  // tap's block holding its running sum.
  for (genvar k = 0; k < TAPS; k++) begin : g_mac
    logic [2*N-1:0] prod;
    logic [YW-1:0]  acc;

    approx_multiplier #(.N(N), .LOW_COLS(LOW_COLS), .MID_COLS(MID_COLS)) u_mul (
      .a(tap[k]), .b(COEF[k]), .p(prod)
    );

    if (k == 0) begin : g_first
      assign acc = YW'(prod);
    end else begin : g_add
      logic unused_cout;
      rca_adder #(.W(YW)) u_add (
        .a(g_mac[k-1].acc), .b(YW'(prod)), .cin(1'b0), .s(acc), .cout(unused_cout)
      );
    end
  end

  always_ff @(posedge clk) begin
    if (rst) Y <= '0;
    else     Y <= g_mac[TAPS-1].acc;
  end

endmodule
