// max_unit: running maximum of the two newest filter results.
//
//   newmax = max( max(num1, num2), oldmax )     (signed, two's complement)
//
// Two registered compare stages, both advanced by `en`: the first keeps the
// larger of the two new results, the second compares it with the maximum read
// back from the exchange RAM. So a negative result such as 0xFFFE75D8 never
// beats a positive one such as 0x504F0000. The maximum is the first step of
// band normalisation (the divide by it stays in software).
//
// Timing: with `en` high on consecutive edges, newmax reflects num1/num2 two
// edges after they were presented and oldmax one edge after. The function
// and the two comparisons follow the original design; the enable and reset
// are this implementation's choice.
module max_unit
  import hsi_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  pix_t num1,
  input  pix_t num2,
  input  pix_t oldmax,
  output pix_t newmax
);

  pix_t larger;  // stage 1: larger of the two new results

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      larger <= '0;
      newmax <= '0;
    end else if (en) begin
      larger <= (num1 > num2) ? num1 : num2;
      newmax <= (larger > oldmax) ? larger : oldmax;
    end
  end

endmodule
