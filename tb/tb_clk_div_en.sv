// Testbench of clk_div_en: with the default division of 8 the enable must be
// high for exactly one cycle in eight, the first time in the eighth cycle
// after reset; a second instance checks a division of 5, a third DIV = 1.
module tb_clk_div_en;

  logic clk = 0, rst = 1;
  logic ce8, ce5, ce1;
  int checks = 0, failures = 0;

  clk_div_en             dut8 (.clk, .rst, .ce(ce8));
  clk_div_en #(.DIV(5))  dut5 (.clk, .rst, .ce(ce5));
  clk_div_en #(.DIV(1))  dut1 (.clk, .rst, .ce(ce1));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int cyc = 1; cyc <= 400; cyc++) begin
      @(posedge clk); #1;
      checks++;
      if (ce8 !== (cyc % 8 == 0)) begin failures++; $display("FAIL div8 cycle %0d", cyc); end
      checks++;
      if (ce5 !== (cyc % 5 == 0)) begin failures++; $display("FAIL div5 cycle %0d", cyc); end
      checks++;
      if (ce1 !== 1'b1) begin failures++; $display("FAIL div1 cycle %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
