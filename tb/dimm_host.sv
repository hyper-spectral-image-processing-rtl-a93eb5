// Behavioural model of the host PC's memory bus, for testbenches only.
//
// It drives the board's SDRAM pins the way the host's 64-bit access routines
// do: write64() puts one WRITE command with its address and data on the pins
// for a cycle, read64() one READ command, then takes the data bus when the
// board drives it. Word addresses are those of the core; the model applies
// the board's inversion of address bits 7..4. Between commands the chip
// select is high (deselected). It also measures the read latency, from the
// command cycle to the first cycle the board drives the bus.
module dimm_host (
  input  logic        clk,
  output logic        dimm_s,
  output logic        dimm_ras,
  output logic        dimm_cas,
  output logic        dimm_we,
  output logic [13:0] dimm_a,
  output logic [63:0] dimm_d_i,
  input  logic [63:0] dimm_d_o,
  input  logic        dimm_d_oe
);

  int last_read_latency = 0;
  int n_writes = 0, n_reads = 0;

  initial begin
    dimm_s = 1; dimm_ras = 1; dimm_cas = 1; dimm_we = 1;
    dimm_a = '0; dimm_d_i = '0;
  end

  function automatic logic [13:0] pin_addr(int word);
    logic [13:0] a;
    a = 14'(word);
    return {a[13:8], ~a[7:4], a[3:0]};
  endfunction

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic write64(int word, logic [63:0] data);
    @(negedge clk);
    dimm_s = 0; dimm_ras = 1; dimm_cas = 0; dimm_we = 0;
    dimm_a = pin_addr(word); dimm_d_i = data;
    @(negedge clk);
    dimm_s = 1; dimm_cas = 1; dimm_we = 1;
    n_writes++;
  endtask

  task automatic read64(int word, output logic [63:0] data);
    int n = 0;
    @(negedge clk);
    dimm_s = 0; dimm_ras = 1; dimm_cas = 0; dimm_we = 1;
    dimm_a = pin_addr(word);
    @(negedge clk);
    dimm_s = 1; dimm_cas = 1;
    n = 1;
    while (!dimm_d_oe && n < 50) begin @(negedge clk); n++; end
    last_read_latency = n;
    data = dimm_d_o;
    n_reads++;
  endtask

endmodule
