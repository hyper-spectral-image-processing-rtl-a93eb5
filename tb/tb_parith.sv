// Testbench of parith, connected to the exchange RAM whose port A the
// testbench drives as the host would. Each iteration loads random pixels into
// words 0..3 and checks word 7 (both low-pass results), word 6 (counter + 1
// and the running maximum) and the eleven enabled cycles from the start
// acknowledge to finish. The enable comes every third cycle. Also checked:
// the maximum is kept when both results are smaller, a reset command in the
// middle of an iteration stops it before it writes, and the state sequence
// visits S0..S10 in order.
module tb_parith;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1, ce = 0, srst = 0, start = 0;
  logic start_ack, we, finish;
  logic [7:0]  addr, addra = 0;
  logic [63:0] din, dout, dina = 0, douta;
  logic        wea = 0;
  int checks = 0, failures = 0;
  int ce_cnt = 0;

  parith dut (.clk, .rst, .ce, .srst, .start, .start_ack, .addr, .din, .dout, .we, .finish);
  dpram256_64 ram (.clk, .addra, .dina, .wea, .douta,
                   .ceb(ce), .addrb(addr), .dinb(din), .web(we), .doutb(dout));

  always #5 clk = ~clk;

  // enable every third cycle
  int div = 0;
  always @(posedge clk) begin
    div <= (div == 2) ? 0 : div + 1;
    ce  <= (div == 2);
    if (ce) ce_cnt <= ce_cnt + 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(int a, logic [63:0] d);
    @(negedge clk); addra = 8'(a); dina = d; wea = 1;
    @(negedge clk); wea = 0;
  endtask

  task automatic host_read(int a, output logic [63:0] d);
    @(negedge clk); addra = 8'(a);
    @(posedge clk); #1 d = douta;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int p [8];
  int exp_max, exp_cnt, n_kept = 0, n_new = 0;

  task automatic iteration(bit small_values);
    logic [63:0] w6, w7;
    int t0, ra, rb, m;
    for (int i = 0; i < 8; i++) p[i] = small_values ? -int'($urandom_range(0, 100000)) : int'($urandom);
    for (int w = 0; w < 4; w++) host_write(w, {p[2*w], p[2*w+1]});
    @(negedge clk); start = 1;
    while (!start_ack) @(posedge clk);
    t0 = ce_cnt;
    @(negedge clk); start = 0;
    while (!finish) @(posedge clk);
    check(ce_cnt - t0 == 11, $sformatf("latency %0d enabled cycles", ce_cnt - t0));
    repeat (6) @(posedge clk);   // word 6 lands on the next enable
    ra = daub4_lp(p[0], p[1], p[2], p[3]);
    rb = daub4_lp(p[4], p[5], p[6], p[7]);
    m = smax(smax(ra, rb), exp_max);
    if (m == exp_max) n_kept++; else n_new++;
    exp_max = m;
    exp_cnt++;
    host_read(7, w7);
    host_read(6, w6);
    check(w7 == {ra, rb}, $sformatf("word 7 %h expected %h%h", w7, ra, rb));
    check(w6[31:0] == exp_max, $sformatf("maximum %h expected %h", w6[31:0], exp_max));
    check(w6[63:32] == exp_cnt, $sformatf("counter %0d expected %0d", w6[63:32], exp_cnt));
  endtask

  // state sequence monitor
  hsi_pkg::pstate_t prev;
  int seq_err = 0, n_s10 = 0;
  always @(posedge clk) if (!rst && ce) begin
    prev <= dut.state;
    if (dut.state != hsi_pkg::S0 && prev != hsi_pkg::S0 && !srst && dut.state != prev + 1) seq_err++;
    if (dut.state == hsi_pkg::S10) n_s10++;
  end

  initial begin
    logic [63:0] w6, w7;
    repeat (3) @(posedge clk);
    rst = 0;
    exp_max = 32'h80000000;
    exp_cnt = 100;
    host_write(6, {32'd100, 32'h80000000});
    for (int k = 0; k < 30; k++) iteration(0);
    for (int k = 0; k < 5; k++) iteration(1);   // negative results: maximum kept
    check(n_kept > 0 && n_new > 0, "maximum both replaced and kept");
    // reset command during an iteration: nothing is written to word 7
    host_write(7, 64'h0123456789ABCDEF);
    @(negedge clk); start = 1;
    while (!start_ack) @(posedge clk);
    @(negedge clk); start = 0;
    repeat (15) @(posedge clk);          // about S5
    @(negedge clk); srst = 1;
    @(negedge clk); srst = 0;
    check(dut.state == hsi_pkg::S0 && !finish, "reset command returns to S0");
    repeat (60) @(posedge clk);
    host_read(7, w7);
    check(w7 == 64'h0123456789ABCDEF, "no write after the reset command");
    // the controller still works afterwards
    host_read(6, w6);
    exp_cnt = w6[63:32]; exp_max = w6[31:0];
    iteration(0);
    check(seq_err == 0, "state sequence S0..S10");
    check(n_s10 == 36, $sformatf("%0d complete iterations", n_s10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
