// Shared types and constants of the Daub4 wavelet / band-maximum accelerator.
//
// Pixels travel as 32-bit signed fixed-point numbers with 10 fraction bits
// (Q22.10). Two pixels share one 64-bit BlockRAM word: the first pixel sits in
// the upper half [63:32], the second in the lower half [31:0].
//
// The four low-pass Daub4 coefficients are 15-bit signed integers scaled by
// 2^13 (13 fraction bits): 0.48242, 0.83654, 0.22412 and -0.12939, i.e.
// 3952, 6853, 1836 and -1060. They are the rounded values of
// h0..h3 = (1+sqrt3, 3+sqrt3, 3-sqrt3, 1-sqrt3) / (4*sqrt2) used by the
// original design, not re-rounded here.
//
// Memory map of the 256 x 64 exchange RAM (word addresses as seen by pcore):
//   0..3  input pixels: word 0,1 = four pixels of the first filter window,
//         word 2,3 = four pixels of the second window
//   4     a host write here starts one iteration (command, data ignored)
//   5     a host write here resets the controller (command, data ignored)
//   6     {counter[31:0], running maximum[31:0]}
//   7     {result of window 1, result of window 2}
package hsi_pkg;

  localparam int unsigned PIX_W   = 32;  // pixel width
  localparam int unsigned PIX_FRAC = 10; // fraction bits of a pixel
  localparam int unsigned COEF_W  = 15;  // coefficient width
  localparam int unsigned COEF_FRAC = 13; // fraction bits of a coefficient
  localparam int unsigned WORD_W  = 64;  // host bus / RAM word width
  localparam int unsigned ADDR_W  = 8;   // RAM word address width

  typedef logic signed [PIX_W-1:0]  pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic        [WORD_W-1:0] word_t;
  typedef logic        [ADDR_W-1:0] addr_t;

  localparam coef_t H0 = 15'sd3952;   //  0.48242
  localparam coef_t H1 = 15'sd6853;   //  0.83654
  localparam coef_t H2 = 15'sd1836;   //  0.22412
  localparam coef_t H3 = -15'sd1060;  // -0.12939

  localparam addr_t A_IN0   = 8'd0;
  localparam addr_t A_IN1   = 8'd1;
  localparam addr_t A_IN2   = 8'd2;
  localparam addr_t A_IN3   = 8'd3;
  localparam addr_t A_START = 8'd4;
  localparam addr_t A_RESET = 8'd5;
  localparam addr_t A_MAX   = 8'd6;
  localparam addr_t A_RES   = 8'd7;

  // Eleven states of the controller, one per divided-clock cycle.
  typedef enum logic [3:0] {
    S0, S1, S2, S3, S4, S5, S6, S7, S8, S9, S10
  } pstate_t;

endpackage
