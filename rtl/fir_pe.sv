// fir_pe: inner-product processing element of the systolic FIR filter.
//
// Each element computes y_out = y_in + a * x_in, the step of equation
// y_out = y_in + a_i * x_in that one tap of an FIR filter performs. The sample
// entering on x_in is first captured in an input register; that registered
// sample feeds the multiplier and also leaves the element on x_out, so the
// sample advances one element per clock. The product is added to the partial
// sum arriving on y_in and the result passes through two output registers
// before leaving on y_out, so a partial sum advances one element every two
// clocks. The structure (one register on x, adder then two registers on y) is
// the reference design's; the widths, the wrap-around arithmetic and the
// synchronous active-high reset are this design's choices.
//
// Interface:
//   clk, rst   clock; synchronous reset that clears all three registers
//   coef       filter coefficient a_i, held static by the user (COEF_W bits)
//   x_in       sample from the previous element or the filter input
//   y_in       partial sum from the previous element (0 for the first one)
//   x_out      registered sample, to the next element
//   y_out      registered partial sum, to the next element or the output
//
// Timing, counting rising clock edges and taking an input "at edge t" as the
// value on the port when edge t occurs:
//   x_out after edge t = x_in at edge t
//   y_out after edge t = y_in at edge t-1 + coef at edge t-1 * x_in at edge t-2
// The product and the sum are truncated to ACC_W bits (unsigned, modulo
// 2**ACC_W).
module fir_pe #(
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned ACC_W  = fir_pkg::ACC_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [COEF_W-1:0] coef,
  input  logic [DATA_W-1:0] x_in,
  input  logic [ACC_W-1:0]  y_in,
  output logic [DATA_W-1:0] x_out,
  output logic [ACC_W-1:0]  y_out
);

  logic [DATA_W-1:0] x_reg;   // input sample register
  logic [ACC_W-1:0]  prod;    // coef * x_reg, truncated to ACC_W bits
  logic [ACC_W-1:0]  sum;     // y_in + prod, truncated to ACC_W bits
  logic [ACC_W-1:0]  y_reg1;  // first output register
  logic [ACC_W-1:0]  y_reg2;  // second output register

  // The low ACC_W bits of a product depend only on the low ACC_W bits of its
  // operands, so resizing both operands to ACC_W gives the product modulo
  // 2**ACC_W for any relation between the widths.
  always_comb begin
    prod = ACC_W'(coef) * ACC_W'(x_reg);
    sum  = y_in + prod;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x_reg  <= '0;
      y_reg1 <= '0;
      y_reg2 <= '0;
    end else begin
      x_reg  <= x_in;
      y_reg1 <= sum;
      y_reg2 <= y_reg1;
    end
  end

  assign x_out = x_reg;
  assign y_out = y_reg2;

endmodule
