// fxmult: low-pass Daub4 filter tap, a registered sum of four products.
//
//   q = ( a0*H0 + a1*H1 + a2*H2 + a3*H3 ) >>> 13, kept to 32 bits
//
// The pixels a0..a3 are signed Q22.10 and the coefficients signed 15-bit
// integers carrying 13 fraction bits, so every product carries 23 fraction
// bits. Shifting the sum right by 13 (arithmetic, rounding toward minus
// infinity) brings it back to 10 fraction bits; the upper bits above the 32
// kept ones are dropped, as in the original design, which keeps bits [44:13]
// of the sum. Coefficients are treated as integers rather than fractions, so
// no fractional multiply is needed.
//
// Timing: when `en` is high at a rising clock edge, q takes the result of the
// inputs present at that edge. One cycle of latency; q holds otherwise.
// Coefficients and the shift come from the original design; the single
// pipeline register and the enable port are this implementation's choice.
module fxmult
  import hsi_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  pix_t a0,
  input  pix_t a1,
  input  pix_t a2,
  input  pix_t a3,
  output pix_t q
);

  localparam int unsigned PROD_W = PIX_W + COEF_W;  // 47
  localparam int unsigned SUM_W  = PROD_W + 2;      // 49, no overflow

  logic signed [SUM_W-1:0] x0, x1, x2, x3;  // pixels widened to the sum width
  logic signed [SUM_W-1:0] sum;
  logic signed [SUM_W-1:0] shifted;

  always_comb begin
    x0 = SUM_W'(a0);
    x1 = SUM_W'(a1);
    x2 = SUM_W'(a2);
    x3 = SUM_W'(a3);
    sum = x0 * SUM_W'(H0) + x1 * SUM_W'(H1) + x2 * SUM_W'(H2) + x3 * SUM_W'(H3);
    shifted = sum >>> COEF_FRAC;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (en) q <= shifted[PIX_W-1:0];
  end

endmodule
