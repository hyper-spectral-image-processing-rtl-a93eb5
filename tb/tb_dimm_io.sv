// Testbench of dimm_io: random SDRAM pin cycles. Checks that only READ and
// WRITE commands (chip select low, RAS high, CAS low, WE high/low) produce
// strobes, one cycle after the pins; that address bits 7..4 arrive inverted
// and the other bits unchanged; that data in is registered; and that a read
// answer from the core is driven on the pins, with the output enable, three
// cycles after the READ command (core answering one cycle after the strobe).
module tb_dimm_io;

  logic        clk = 0, rst = 1;
  logic        dimm_s = 1, dimm_ras = 1, dimm_cas = 1, dimm_we = 1;
  logic [13:0] dimm_a = 0, addr;
  logic [63:0] dimm_d_i = 0, dimm_d_o, din, dout;
  logic        dimm_d_oe, write;
  int checks = 0, failures = 0;

  dimm_io dut (.clk, .rst, .dimm_s, .dimm_ras, .dimm_cas, .dimm_we, .dimm_a,
               .dimm_d_i, .dimm_d_o, .dimm_d_oe, .write, .addr, .din, .dout);

  // core model: answers with a function of the address one cycle later
  always @(posedge clk) dout <= {50'h3A5A5A5A5A5A5, addr};

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // history of what was on the pins
  logic        h_rd [4], h_wr [4];
  logic [13:0] h_a  [4];
  logic [63:0] h_d  [4];
  int n_rd = 0, n_wr = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 4; i++) begin h_rd[i] = 0; h_wr[i] = 0; h_a[i] = 0; h_d[i] = 0; end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      {dimm_s, dimm_ras, dimm_cas, dimm_we} = 4'($urandom);
      if (t % 3 == 0) begin dimm_s = 0; dimm_ras = 1; dimm_cas = 0; end  // more commands
      dimm_a = 14'($urandom);
      dimm_d_i = {$urandom, $urandom};
      @(posedge clk);
      for (int i = 3; i > 0; i--) begin
        h_rd[i] = h_rd[i-1]; h_wr[i] = h_wr[i-1]; h_a[i] = h_a[i-1]; h_d[i] = h_d[i-1];
      end
      h_rd[0] = !dimm_s && dimm_ras && !dimm_cas && dimm_we;
      h_wr[0] = !dimm_s && dimm_ras && !dimm_cas && !dimm_we;
      h_a[0] = dimm_a; h_d[0] = dimm_d_i;
      if (h_rd[0]) n_rd++;
      if (h_wr[0]) n_wr++;
      #1;
      checks++;
      if (write !== h_wr[0]) begin failures++; $display("FAIL write strobe t=%0d", t); end
      checks++;
      if (addr !== {h_a[0][13:8], ~h_a[0][7:4], h_a[0][3:0]}) begin failures++; $display("FAIL addr t=%0d", t); end
      checks++;
      if (din !== h_d[0]) begin failures++; $display("FAIL din t=%0d", t); end
      if (t >= 3) begin
        checks++;
        if (dimm_d_oe !== h_rd[2]) begin failures++; $display("FAIL oe t=%0d", t); end
        checks++;
        if (dimm_d_o !== {50'h3A5A5A5A5A5A5, h_a[2][13:8], ~h_a[2][7:4], h_a[2][3:0]}) begin
          failures++; $display("FAIL read data t=%0d", t);
        end
      end
    end
    checks++;
    if (n_rd < 100 || n_wr < 100) begin failures++; $display("FAIL too few commands"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
