// Testbench of max_unit: the worked example of the original design
// (0xFFFE75D8 against 0x504F0000 with old maximum 0 gives 0x504F0000), signed
// edge cases, random triples against a reference, the two-stage latency and
// the hold while the enable is low.
module tb_max_unit;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic signed [31:0] num1 = 0, num2 = 0, oldmax = 0, newmax;
  int checks = 0, failures = 0;

  max_unit dut (.clk, .rst, .en, .num1, .num2, .oldmax, .newmax);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // present the new pair for one enabled edge, the old maximum for the next
  task automatic apply(int n1, int n2, int old, int expect_max);
    @(negedge clk);
    num1 = n1; num2 = n2; en = 1;
    @(negedge clk);
    num1 = $urandom; num2 = $urandom; oldmax = old;   // stage 1 already took the pair
    @(negedge clk);
    en = 0;
    checks++;
    if (newmax !== expect_max) begin
      failures++;
      $display("FAIL %h %h old %h: got %h expected %h", n1, n2, old, newmax, expect_max);
    end
  endtask

  initial begin
    int a, b, c, hold;
    repeat (2) @(posedge clk);
    rst = 0;
    apply(32'hFFFE75D8, 32'h504F0000, 0, 32'h504F0000);
    apply(32'hFFFE75D8, 32'hFFFF0000, 0, 0);                   // old maximum kept
    apply(32'hFFFE75D8, 32'hFFFF0000, 32'h80000000, 32'hFFFF0000);
    apply(32'h7FFFFFFF, 32'h80000000, 32'h7FFFFFFE, 32'h7FFFFFFF);
    apply(5, 5, 5, 5);
    for (int i = 0; i < 300; i++) begin
      a = $urandom; b = $urandom; c = $urandom;
      apply(a, b, c, smax(smax(a, b), c));
    end
    hold = newmax;
    @(negedge clk); num1 = 32'h7FFFFFFF; num2 = 32'h7FFFFFFF; oldmax = 32'h7FFFFFFF;
    repeat (3) @(negedge clk);
    checks++;
    if (newmax !== hold) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
