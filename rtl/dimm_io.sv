// dimm_io: the board's SDRAM-slot front end, turning the host's memory bus
// cycles into single-cycle read and write strobes for the user core.
//
// The host sees the board as memory. An SDRAM READ command (chip select low,
// RAS high, CAS low, WE high) or WRITE command (same, WE low) sampled on the
// pins becomes a one-cycle `read` or `write` strobe one cycle later, in step
// with the registered address and data. All pins pass through one register,
// like the I/O-block flip-flops of the original. Address bits 7..4 are
// inverted on the way in, as the board's address wiring requires; a host
// offset with those bits set to 1111 reaches core word 0..15.
//
// Read path: the core answers one cycle after the strobe; its word is
// registered once more into `d_o`, and `d_oe` rises in the same cycle, so
// the data drive the bus three cycles after the READ command was on the pins
// and for as many cycles as the command lasted. The core needs no read
// strobe: its RAM reads the addressed word every cycle.
//
// The command decode, the address inversion and the output-enable timing
// follow the original board files. The data-mask, external header and clock
// DLL pins are left out: the core uses none of them.
module dimm_io
  import hsi_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // pins
  input  logic        dimm_s,
  input  logic        dimm_ras,
  input  logic        dimm_cas,
  input  logic        dimm_we,
  input  logic [13:0] dimm_a,
  input  word_t       dimm_d_i,
  output word_t       dimm_d_o,
  output logic        dimm_d_oe,
  // core side
  output logic        write,
  output logic [13:0] addr,
  output word_t       din,
  input  word_t       dout
);

  logic        read_p, write_p, read, read_d;
  logic [13:0] addr_raw;

  assign read_p  = !dimm_s && dimm_ras && !dimm_cas &&  dimm_we;
  assign write_p = !dimm_s && dimm_ras && !dimm_cas && !dimm_we;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      read      <= 1'b0;
      write     <= 1'b0;
      read_d    <= 1'b0;
      dimm_d_oe <= 1'b0;
      addr_raw  <= '0;
      din       <= '0;
      dimm_d_o  <= '0;
    end else begin
      read      <= read_p;
      write     <= write_p;
      read_d    <= read;
      dimm_d_oe <= read_d;
      addr_raw  <= dimm_a;
      din       <= dimm_d_i;
      dimm_d_o  <= dout;
    end
  end

  assign addr = {addr_raw[13:8], ~addr_raw[7:4], addr_raw[3:0]};

  a_one_command: assert property (@(posedge clk) disable iff (rst) !(read && write));

endmodule
