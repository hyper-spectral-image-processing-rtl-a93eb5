// pilchard: top level of the hyper-spectral wavelet accelerator board.
//
// The board sits in a PC's SDRAM DIMM slot and is used by the host as a small
// memory window. For every pair of low-pass Daub4 outputs the host writes
// eight 32-bit fixed-point pixels into words 0..3, writes word 4 to start, and
// reads the two results from word 7 and {counter, band maximum} from word 6.
// The host does the decimation and the row/column bookkeeping of the 2-D
// transform by choosing which pixels to stream; the board does the sums of
// products and keeps the running maximum of the band, which the
// normalisation step needs.
//
//   pins -> dimm_io (command decode, I/O registers)
//        -> pcore   (exchange RAM + parith controller with fxmult x2, max_unit)
//   clk_div_en provides the divided clock enable for the controller.
//
// Ports: `clk` is the DIMM clock (100 MHz on the original board), `rst` the
// board reset, the dimm_* pins the SDRAM command/address/data signals with
// the bidirectional data bus split into d_i, d_o and the drive enable d_oe,
// and `finish` brings out the controller's done flag for debugging.
// CLK_DIV is the controller clock division (8, giving 12.5 MHz).
// The hierarchy follows the original design; see the modules for the
// choices made where it is silent.
module pilchard
  import hsi_pkg::*;
#(
  parameter int unsigned CLK_DIV = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        dimm_s,
  input  logic        dimm_ras,
  input  logic        dimm_cas,
  input  logic        dimm_we,
  input  logic [13:0] dimm_a,
  input  word_t       dimm_d_i,
  output word_t       dimm_d_o,
  output logic        dimm_d_oe,
  output logic        finish
);

  logic        ce, write;
  logic [13:0] addr;
  word_t       din, dout;

  clk_div_en #(.DIV(CLK_DIV)) u_div (.clk, .rst, .ce);

  dimm_io u_io (
    .clk, .rst,
    .dimm_s, .dimm_ras, .dimm_cas, .dimm_we, .dimm_a,
    .dimm_d_i, .dimm_d_o, .dimm_d_oe,
    .write, .addr, .din, .dout
  );

  pcore u_core (
    .clk, .rst, .ce,
    .write, .addr, .din, .dout,
    .finish
  );

endmodule
