// Testbench of fxmult: the two worked examples of the original design
// (0, 1.0, 0, 768.0 -> 0xFFFE75D8 and 0, 0x60000000, 0, 0 -> 0x504F0000),
// edge values and random vectors against the reference, a floating-point
// tolerance check on small pixels, the one-cycle latency and the hold when
// the enable is low.
module tb_fxmult;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic signed [31:0] a0 = 0, a1 = 0, a2 = 0, a3 = 0, q;
  int checks = 0, failures = 0;

  fxmult dut (.clk, .rst, .en, .a0, .a1, .a2, .a3, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int x0, int x1, int x2, int x3, int expect_q);
    @(negedge clk);
    a0 = x0; a1 = x1; a2 = x2; a3 = x3; en = 1;
    @(negedge clk);
    en = 0;
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("FAIL %h %h %h %h: q=%h expected %h", x0, x1, x2, x3, q, expect_q);
    end
  endtask

  initial begin
    int r0, r1, r2, r3, hold;
    real err;
    repeat (2) @(posedge clk);
    rst = 0;
    // worked examples
    apply(0, 32'h400, 0, 32'h000C0000, 32'hFFFE75D8);
    apply(0, 32'h60000000, 0, 0, 32'h504F0000);
    // one pixel of 1.0 in each tap gives the coefficient shifted to 10 bits
    apply(32'h400, 0, 0, 0, 3952 >>> 3);
    apply(0, 0, 0, 32'h400, -1060 >>> 3);
    apply(32'h7FFFFFFF, 32'h7FFFFFFF, 32'h7FFFFFFF, 32'h80000000,
          daub4_lp(32'h7FFFFFFF, 32'h7FFFFFFF, 32'h7FFFFFFF, 32'h80000000));
    for (int i = 0; i < 400; i++) begin
      r0 = $urandom; r1 = $urandom; r2 = $urandom; r3 = $urandom;
      if (i % 2 == 0) begin  // small pixels, also checked against real arithmetic
        r0 = r0 % 4000000; r1 = r1 % 4000000; r2 = r2 % 4000000; r3 = r3 % 4000000;
      end
      apply(r0, r1, r2, r3, daub4_lp(r0, r1, r2, r3));
      if (i % 2 == 0) begin
        err = daub4_real(r0, r1, r2, r3) - real'(q) / 1024.0;
        checks++;
        if (err < 0.0 || err >= 1.0 / 1024.0 + 1e-6) begin
          failures++;
          $display("FAIL tolerance: err=%f", err);
        end
      end
    end
    // hold: inputs change while en is low, q must not
    hold = q;
    @(negedge clk); a0 = 32'h12345; a1 = 32'h777;
    repeat (3) @(negedge clk);
    checks++;
    if (q !== hold) begin failures++; $display("FAIL hold"); end
    // latency: q changes at the first edge with en high, not before
    @(negedge clk); a0 = 32'h400; a1 = 0; a2 = 0; a3 = 0; en = 1;
    checks++;
    if (q !== hold) begin failures++; $display("FAIL early update"); end
    @(negedge clk); en = 0;
    checks++;
    if (q !== (3952 >>> 3)) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
