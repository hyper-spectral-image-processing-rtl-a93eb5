// End-to-end testbench of the board, at its default parameters, driven
// through the SDRAM pins by the host bus model.
//
// It streams random filter windows the way the host program does: eight
// pixels into words 0..3, a start command to word 4, then reads word 7 and
// word 6. Every result, the running maximum and the counter are compared with
// the reference arithmetic. It also times the iteration (eleven divided
// states S0..S10 of eight host cycles each) and the three-cycle host read latency,
// and it makes each mechanism of the design happen and counts it:
//   iteration       a start command ran one iteration
//   max_replaced    a new result became the band maximum
//   max_kept        the stored maximum was larger than both results
//   negative        a negative low-pass result
//   held_start      a start command given while an iteration was running
//   reset_cmd       a reset command given during an iteration
// A mechanism that never happened counts as a failure.
module tb_pilchard;
  import tb_ref_pkg::*;

  logic        clk = 0, rst = 1;
  logic        dimm_s, dimm_ras, dimm_cas, dimm_we, dimm_d_oe, finish;
  logic [13:0] dimm_a;
  logic [63:0] dimm_d_i, dimm_d_o;
  int checks = 0, failures = 0;

  pilchard dut (.clk, .rst, .dimm_s, .dimm_ras, .dimm_cas, .dimm_we, .dimm_a,
                .dimm_d_i, .dimm_d_o, .dimm_d_oe, .finish);
  dimm_host host (.clk, .dimm_s, .dimm_ras, .dimm_cas, .dimm_we, .dimm_a,
                  .dimm_d_i, .dimm_d_o, .dimm_d_oe);

  always #5 clk = ~clk;   // 100 MHz host clock

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_iter = 0, n_replaced = 0, n_kept = 0, n_neg = 0, n_held = 0, n_reset = 0;
  int exp_max, exp_cnt;
  int p [8];

  task automatic load_random(int mode);
    for (int i = 0; i < 8; i++)
      case (mode)
        0: p[i] = int'($urandom_range(0, 1 << 26));         // up to 65536.0
        1: p[i] = -int'($urandom_range(0, 1 << 20));        // negative
        default: p[i] = int'($urandom);
      endcase
    for (int w = 0; w < 4; w++) host.write64(w, {p[2*w], p[2*w+1]});
  endtask

  task automatic wait_counter(int c);
    logic [63:0] w;
    int n = 0;
    do begin host.read64(6, w); n++; end while (w[63:32] != c && n < 500);
  endtask

  task automatic account(int ra, int rb);
    int m;
    m = smax(smax(ra, rb), exp_max);
    if (m == exp_max) n_kept++; else n_replaced++;
    if (ra < 0 || rb < 0) n_neg++;
    exp_max = m;
  endtask

  task automatic iteration(int mode);
    logic [63:0] w6, w7;
    int ra, rb;
    load_random(mode);
    host.write64(4, 64'd0);
    // the host does not wait for finish: polling the counter is enough
    wait_counter(exp_cnt + 1);
    exp_cnt++;
    n_iter++;
    host.read64(7, w7);
    host.read64(6, w6);
    check(host.last_read_latency == 3, $sformatf("read latency %0d", host.last_read_latency));
    ra = daub4_lp(p[0], p[1], p[2], p[3]);
    rb = daub4_lp(p[4], p[5], p[6], p[7]);
    account(ra, rb);
    check(w7 == {ra, rb}, $sformatf("word 7 %h expected %h%h", w7, ra, rb));
    check(w6 == {exp_cnt, exp_max}, $sformatf("word 6 %h expected %h%h", w6, exp_cnt, exp_max));
  endtask

  initial begin
    logic [63:0] w6, w7;
    int t0, dt, ra, rb;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (4) @(posedge clk);

    // the example of the original waveforms, first iteration of a band
    exp_cnt = 0; exp_max = 0;
    host.write64(6, 64'd0);
    host.write64(0, {32'h00000000, 32'h00000400});
    host.write64(1, {32'h00000000, 32'h000C0000});
    host.write64(2, {32'h00000000, 32'h60000000});
    host.write64(3, {32'h00000000, 32'h00000000});
    host.write64(4, 64'd0);
    t0 = cyc;
    @(posedge finish);
    dt = cyc - t0;
    // states S0..S10: the start is taken in S0 on an enable, finish rises ten
    // enables (80 host cycles) later; up to one period to meet the first
    // enable and three cycles through the pin and command registers
    check(dt >= 81 && dt <= 91, $sformatf("iteration took %0d host cycles", dt));
    host.idle(10);
    host.read64(7, w7);
    host.read64(6, w6);
    check(w7 == 64'hFFFE75D8_504F0000, $sformatf("example results %h", w7));
    check(w6 == 64'h00000001_504F0000, $sformatf("example counter/max %h", w6));
    exp_cnt = 1; exp_max = 32'h504F0000; n_iter++; n_replaced++; n_neg++;

    // a band's worth of random windows, positive, negative, any
    for (int k = 0; k < 40; k++) iteration(0);
    for (int k = 0; k < 5; k++) iteration(1);
    for (int k = 0; k < 10; k++) iteration(2);

    // start command while an iteration runs: it is held and runs next
    load_random(0);
    host.write64(4, 64'd0);
    host.idle(20);
    host.write64(4, 64'd0);
    n_held++;
    wait_counter(exp_cnt + 2);
    ra = daub4_lp(p[0], p[1], p[2], p[3]);
    rb = daub4_lp(p[4], p[5], p[6], p[7]);
    account(ra, rb);
    exp_cnt += 2; n_iter += 2;
    host.read64(6, w6);
    check(w6 == {exp_cnt, exp_max}, "held start ran once more");

    // reset command in the middle of an iteration: nothing is written
    host.write64(7, 64'hDEADBEEF_CAFEF00D);
    host.write64(4, 64'd0);
    host.idle(40);
    host.write64(5, 64'd0);
    n_reset++;
    host.idle(200);
    host.read64(7, w7);
    host.read64(6, w6);
    check(w7 == 64'hDEADBEEF_CAFEF00D, "reset command stopped the iteration");
    check(w6 == {exp_cnt, exp_max}, "counter unchanged by the stopped iteration");
    check(!finish, "finish cleared by the reset command");
    // and the board carries on
    for (int k = 0; k < 5; k++) iteration(0);

    check(n_iter > 0, "mechanism iteration");
    check(n_replaced > 0, "mechanism max_replaced");
    check(n_kept > 0, "mechanism max_kept");
    check(n_neg > 0, "mechanism negative");
    check(n_held > 0, "mechanism held_start");
    check(n_reset > 0, "mechanism reset_cmd");
    $display("mechanisms: iteration=%0d max_replaced=%0d max_kept=%0d negative=%0d held_start=%0d reset_cmd=%0d",
             n_iter, n_replaced, n_kept, n_neg, n_held, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
