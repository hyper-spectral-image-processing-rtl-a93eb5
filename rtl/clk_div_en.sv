// clk_div_en: divided core clock, expressed as a clock enable.
//
// The original board derives the controller's clock from the host clock with
// the FPGA's delay-locked loop, divided by 8 (100 MHz to 12.5 MHz, which the
// 32-bit datapath needs since it closes timing at about 14 MHz). Here the
// whole design stays on the one host clock and this counter raises `ce` for
// one cycle out of every DIV; logic "on the divided clock" advances only
// when `ce` is high. The division factor is the original one; replacing the
// second clock by an enable is this implementation's choice, and it removes
// the clock-domain crossing between the host side and the controller.
//
// Timing: after reset, `ce` is high in the DIV-th cycle and then every DIV
// cycles. DIV = 1 keeps `ce` high.
module clk_div_en #(
  parameter int unsigned DIV = 8
) (
  input  logic clk,
  input  logic rst,
  output logic ce
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt <= '0;
      ce  <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt <= '0;
      ce  <= 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
      ce  <= (DIV == 1);
    end
  end

endmodule
