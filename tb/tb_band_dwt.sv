// Workload testbench: the low-pass/low-pass (LL) Daub4 wavelet transform of
// one full hyper-spectral band of 460 x 400 pixels, streamed through the
// board's pins at its default parameters, the way the host program uses it.
//
// Pass 1 filters each of the 460 rows of 400 pixels into 200 outputs
// (output k uses pixels 2k..2k+3, wrapping around the end of the row);
// pass 2 filters each of the 200 resulting columns of 460 values into 230.
// Every iteration carries two neighbouring outputs: the host writes the two
// four-pixel windows into words 0..3, starts, waits about as long as an
// iteration takes, and reads word 7 and word 6. Before each pass the host
// clears word 6, so after a pass it holds the number of iterations
// (46,000, then 23,000) and the maximum of that pass, the band maximum used
// to normalise the 230 x 200 LL image.
// Each result is checked against the reference arithmetic, and the counter
// and maximum after each pass against the values the testbench works out;
// the band maximum is also checked against the maximum of the stored LL image.
// Pixels are random in 0 .. 4095 (12-bit intensities) in Q22.10.
module tb_band_dwt;
  import tb_ref_pkg::*;

  localparam int ROWS = 460;   // samples
  localparam int COLS = 400;   // lines
  localparam int OROWS = ROWS / 2;
  localparam int OCOLS = COLS / 2;

  logic        clk = 0, rst = 1;
  logic        dimm_s, dimm_ras, dimm_cas, dimm_we, dimm_d_oe, finish;
  logic [13:0] dimm_a;
  logic [63:0] dimm_d_i, dimm_d_o;
  int checks = 0, failures = 0;

  pilchard dut (.clk, .rst, .dimm_s, .dimm_ras, .dimm_cas, .dimm_we, .dimm_a,
                .dimm_d_i, .dimm_d_o, .dimm_d_oe, .finish);
  dimm_host host (.clk, .dimm_s, .dimm_ras, .dimm_cas, .dimm_we, .dimm_a,
                  .dimm_d_i, .dimm_d_o, .dimm_d_oe);

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img  [ROWS][COLS];
  int rowp [ROWS][OCOLS];   // pass 1 results read from the board
  int ll   [OROWS][OCOLS];  // pass 2 results read from the board
  int n_bad = 0;
  int n_finish = 0;         // rising edges of the finish pin after reset

  logic finish_q = 0;
  always @(posedge clk) begin
    finish_q <= finish;
    if (!rst && finish && !finish_q) n_finish <= n_finish + 1;
  end

  // one iteration: windows s[0..3] and s[4..7], returns both results
  task automatic run(int s [8], output int ra, output int rb, output logic [63:0] w6);
    logic [63:0] w7;
    for (int w = 0; w < 4; w++) host.write64(w, {s[2*w], s[2*w+1]});
    host.write64(4, 64'd0);
    host.idle(100);   // an iteration and the word 6 write take at most 99 cycles
    host.read64(7, w7);
    host.read64(6, w6);
    ra = int'(w7[63:32]);
    rb = int'(w7[31:0]);
    checks += 2;
    if (ra != daub4_lp(s[0], s[1], s[2], s[3])) begin n_bad++; failures++; end
    if (rb != daub4_lp(s[4], s[5], s[6], s[7])) begin n_bad++; failures++; end
    if (n_bad > 0 && n_bad < 5) $display("FAIL result mismatch");
  endtask

  initial begin
    int s [8];
    int ra, rb, pmax;
    logic [63:0] w6;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) img[r][c] = int'($urandom_range(0, 4095 * 1024));
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (4) @(posedge clk);

    // pass 1: rows
    host.write64(6, {32'd0, 32'h80000000});
    pmax = 32'h80000000;
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < OCOLS; k += 2) begin
        for (int j = 0; j < 4; j++) begin
          s[j]     = img[r][(2*k + j) % COLS];
          s[4 + j] = img[r][(2*k + 2 + j) % COLS];
        end
        run(s, ra, rb, w6);
        rowp[r][k] = ra; rowp[r][k+1] = rb;
        pmax = smax(pmax, smax(ra, rb));
      end
    checks += 2;
    if (w6[63:32] != ROWS * OCOLS / 2) begin failures++; $display("FAIL pass 1 counter %0d", w6[63:32]); end
    if (w6[31:0] != pmax) begin failures++; $display("FAIL pass 1 maximum %h expected %h", w6[31:0], pmax); end

    // pass 2: columns of the row results
    host.write64(6, {32'd0, 32'h80000000});
    pmax = 32'h80000000;
    for (int c = 0; c < OCOLS; c++)
      for (int k = 0; k < OROWS; k += 2) begin
        for (int j = 0; j < 4; j++) begin
          s[j]     = rowp[(2*k + j) % ROWS][c];
          s[4 + j] = rowp[(2*k + 2 + j) % ROWS][c];
        end
        run(s, ra, rb, w6);
        ll[k][c] = ra; ll[k+1][c] = rb;
        pmax = smax(pmax, smax(ra, rb));
      end
    checks += 2;
    if (w6[63:32] != OROWS * OCOLS / 2) begin failures++; $display("FAIL pass 2 counter %0d", w6[63:32]); end
    if (w6[31:0] != pmax) begin failures++; $display("FAIL pass 2 maximum %h expected %h", w6[31:0], pmax); end
    // the band maximum, worked out again over the stored LL image
    begin
      automatic int llmax = 32'h80000000;
      for (int r = 0; r < OROWS; r++)
        for (int c = 0; c < OCOLS; c++) llmax = smax(llmax, ll[r][c]);
      checks++;
      if (w6[31:0] != llmax) begin failures++; $display("FAIL band maximum %h, LL image maximum %h", w6[31:0], llmax); end
    end
    checks++;
    if (n_finish != ROWS * OCOLS / 2 + OROWS * OCOLS / 2) begin
      failures++; $display("FAIL finish rose %0d times", n_finish);
    end
    $display("LL band %0d x %0d done, band maximum %0d/1024, %0d result mismatches",
             OROWS, OCOLS, pmax, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
