// Testbench of dpram256_64: random traffic on both ports against an array
// model, checking the one-cycle read latency, read-first behaviour, that
// port B does nothing on edges without its enable, and the collision rule.
module tb_dpram256_64;

  logic        clk = 0;
  logic [7:0]  addra = 0, addrb = 0;
  logic [63:0] dina = 0, dinb = 0, douta, doutb;
  logic        wea = 0, web = 0, ceb = 0;
  int checks = 0, failures = 0;

  logic [63:0] model [256];
  logic [63:0] exp_a, exp_b;

  dpram256_64 dut (.clk, .addra, .dina, .wea, .douta, .ceb, .addrb, .dinb, .web, .doutb);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pending_b;
    // fill every word through port A
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      addra = 8'(i); dina = {$urandom, $urandom}; wea = 1;
      model[i] = dina;
    end
    @(negedge clk); wea = 0;
    exp_b = doutb;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // drive a random operation on each port
      addra = 8'($urandom_range(0, 15)); dina = {$urandom, $urandom}; wea = $urandom_range(0, 2) == 0;
      addrb = 8'($urandom_range(0, 15)); dinb = {$urandom, $urandom}; web = $urandom_range(0, 2) == 0;
      ceb   = $urandom_range(0, 3) == 0;
      if (t == 100) begin addrb = addra; wea = 1; web = 1; ceb = 1; end   // collision
      // expected values after this edge (read-first, port B wins a collision)
      exp_a = model[addra];
      pending_b = ceb;
      if (ceb) exp_b = model[addrb];
      if (wea) model[addra] = dina;
      if (ceb && web) model[addrb] = dinb;
      @(posedge clk); #1;
      checks++;
      if (douta !== exp_a) begin failures++; $display("FAIL port A t=%0d", t); end
      checks++;
      if (doutb !== exp_b) begin failures++; $display("FAIL port B t=%0d ce=%0d", t, pending_b); end
    end
    // final sweep of the whole array through port A
    @(negedge clk); wea = 0; web = 0; ceb = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); addra = 8'(i);
      @(posedge clk); #1;
      checks++;
      if (douta !== model[i]) begin failures++; $display("FAIL sweep %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
