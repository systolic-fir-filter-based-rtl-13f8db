// systolic_fir: full systolic FIR filter built from a chain of fir_pe elements.
//
// The filter computes y(t) = sum_{k=0}^{TAPS-1} a_k * x(t-k) on a stream of
// unsigned samples, one new sample and one new result every clock. TAPS
// identical processing elements are placed side by side; both the samples and
// the partial sums flow from left to right. A sample advances one element per
// clock (one register per element) while a partial sum advances one element
// every two clocks (two registers per element), so as a partial sum moves to
// the right it meets successively newer samples. The leftmost element
// therefore multiplies the oldest sample of the window: coefficient a_k is fed
// to element TAPS-1-k, so that a_0 weights the newest sample as in the FIR
// equation. This replication of one element, its register placement and the
// four-tap main configuration follow the reference design; the coefficient
// ordering, the reset and the widths beyond the 16-bit data path are this
// design's choices.
//
// Interface:
//   clk, rst   clock; synchronous active-high reset that clears every register
//   coef[k]    coefficient a_k of the FIR equation; may be changed at any time
//              (reconfiguration), and results then mix old and new
//              coefficients for the 2*TAPS clocks a partial sum needs to
//              cross the array
//   x_in       input sample, captured on every rising edge
//   y_out      filter output
//   y_part[i]  partial sum leaving element i (y_part[TAPS-1] equals y_out),
//              the intermediate sums y1, y2, y3 that can be watched on chip
//
// Timing, with x(t) the sample captured at rising edge t and y_out read after
// edge t:  y_out(t) = sum_k a_k * x(t - (TAPS+1) - k).
// The newest sample of a window therefore reaches the output TAPS+1 clocks
// after it is captured and the oldest one 2*TAPS clocks after it is captured
// (8 clocks for four taps): the partial-sum path holds 2*TAPS registers. After
// reset, the first output whose whole window consists of captured samples
// appears 2*TAPS clocks after the first sample was captured. Throughput is one
// result per clock. All arithmetic is unsigned, modulo 2**ACC_W.
module systolic_fir #(
  parameter int unsigned TAPS   = fir_pkg::TAPS,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned ACC_W  = fir_pkg::ACC_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [COEF_W-1:0] coef   [TAPS],
  input  logic [DATA_W-1:0] x_in,
  output logic [ACC_W-1:0]  y_out,
  output logic [ACC_W-1:0]  y_part [TAPS]
);

  // x_chain[i] / y_chain[i] enter element i; index TAPS is the right end.
  logic [DATA_W-1:0] x_chain [TAPS+1];
  logic [ACC_W-1:0]  y_chain [TAPS+1];

  assign x_chain[0] = x_in;
  assign y_chain[0] = '0;

  for (genvar i = 0; i < TAPS; i++) begin : g_pe
    fir_pe #(
      .DATA_W(DATA_W),
      .COEF_W(COEF_W),
      .ACC_W (ACC_W)
    ) u_pe (
      .clk  (clk),
      .rst  (rst),
      .coef (coef[TAPS-1-i]),
      .x_in (x_chain[i]),
      .y_in (y_chain[i]),
      .x_out(x_chain[i+1]),
      .y_out(y_chain[i+1])
    );
    assign y_part[i] = y_chain[i+1];
  end

  assign y_out = y_chain[TAPS];

  // x_chain[TAPS], the sample leaving the last element, has no consumer: the
  // right-hand x_out of the array is left open.

endmodule
