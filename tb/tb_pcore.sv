// Testbench of pcore on its host-side bus, with a divided clock enable of
// one cycle in eight. Checks the one-cycle host read latency, the start
// command (write to word 4) with results in words 6 and 7, a start command
// given while an iteration runs (held and run afterwards), the reset command
// (write to word 5) clearing a held start, and that only address bits 7..0
// are decoded.
module tb_pcore;
  import tb_ref_pkg::*;

  logic        clk = 0, rst = 1, ce = 0, write = 0;
  logic [13:0] addr = 0;
  logic [63:0] din = 0, dout;
  logic        finish;
  int checks = 0, failures = 0;

  pcore dut (.clk, .rst, .ce, .write, .addr, .din, .dout, .finish);

  always #5 clk = ~clk;
  int div = 0;
  always @(posedge clk) begin
    div <= (div == 7) ? 0 : div + 1;
    ce  <= (div == 7);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [63:0] d);
    @(negedge clk); addr = 14'(a); din = d; write = 1;
    @(negedge clk); write = 0;
  endtask

  task automatic rd(int a, output logic [63:0] d);
    @(negedge clk); addr = 14'(a);
    @(posedge clk); #1 d = dout;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int p [8];
  task automatic load(int base);
    for (int i = 0; i < 8; i++) p[i] = int'($urandom_range(0, 1 << 24));
    for (int w = 0; w < 4; w++) wr(base + w, {p[2*w], p[2*w+1]});
  endtask

  task automatic wait_count(int c);
    logic [63:0] w;
    int n = 0;
    do begin rd(6, w); n++; end while (w[63:32] != c && n < 2000);
  endtask

  initial begin
    logic [63:0] w, w6, w7;
    int ra, rb, m;
    repeat (3) @(posedge clk);
    rst = 0;
    // host read latency: data one cycle after the address
    wr(9, 64'hFEEDFACE00C0FFEE);
    @(negedge clk); addr = 9;
    @(posedge clk); #1;
    check(dout == 64'hFEEDFACE00C0FFEE, "read data one cycle after the address");
    // aliasing: address 256+9 is word 9
    rd(256 + 9, w);
    check(w == 64'hFEEDFACE00C0FFEE, "only address bits 7..0 decoded");
    // one iteration
    wr(6, {32'd0, 32'h80000000});
    load(0);
    wr(4, 64'd0);
    wait_count(1);
    ra = daub4_lp(p[0], p[1], p[2], p[3]);
    rb = daub4_lp(p[4], p[5], p[6], p[7]);
    rd(7, w7); rd(6, w6);
    check(w7 == {ra, rb}, "results in word 7");
    check(w6 == {32'd1, smax(ra, rb)}, "counter and maximum in word 6");
    m = smax(ra, rb);
    // start command while an iteration runs is held and run afterwards
    wr(4, 64'd0);
    repeat (20) @(posedge clk);
    wr(4, 64'd0);
    check(dut.start_req == 1'b1, "second start held while busy");
    wait_count(3);
    rd(6, w6);
    check(w6[63:32] == 3, "held start ran a second iteration");
    // reset command clears a held start and stops the controller
    wr(4, 64'd0);
    repeat (30) @(posedge clk);
    wr(4, 64'd0);
    wr(5, 64'd0);
    check(dut.start_req == 1'b0 && dut.u_parith.state == hsi_pkg::S0, "reset command clears start and state");
    repeat (300) @(posedge clk);
    rd(6, w6);
    check(w6[63:32] == 3, "no iteration completed after the reset command");
    check(!finish, "finish cleared by the reset command");
    // usable again after the reset command
    load(0);
    wr(4, 64'd0);
    wait_count(4);
    ra = daub4_lp(p[0], p[1], p[2], p[3]);
    rb = daub4_lp(p[4], p[5], p[6], p[7]);
    rd(7, w7); rd(6, w6);
    check(w7 == {ra, rb}, "results after the reset command");
    check(w6[31:0] == smax(smax(ra, rb), m), "running maximum after the reset command");
    check(finish, "finish raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
