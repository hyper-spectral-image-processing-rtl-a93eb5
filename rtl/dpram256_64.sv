// dpram256_64: 256-word x 64-bit dual-port exchange RAM (one Virtex-E
// BlockRAM group in the original board).
//
// Port A belongs to the host interface, port B to the wavelet controller.
// Both ports are synchronous: the address (and, for a write, the data and
// write enable) are taken at a rising edge and the read data appears after
// that edge, one cycle later. Reads return the word stored before a write in
// the same cycle (read-first). Both ports share one clock; port B only acts
// on edges where its clock enable `ceb` is high, which models the slower
// divided clock the controller runs on. If both ports write one address in the
// same edge, port B's data is kept.
//
// Size and the two-port arrangement follow the original design; read-first
// behaviour, the collision rule and the clock enable are this
// implementation's choices. The contents are not initialised; the host
// writes every word it reads.
module dpram256_64
  import hsi_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic  clk,
  // port A (host)
  input  addr_t addra,
  input  word_t dina,
  input  logic  wea,
  output word_t douta,
  // port B (controller), active only when ceb is high
  input  logic  ceb,
  input  addr_t addrb,
  input  word_t dinb,
  input  logic  web,
  output word_t doutb
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    douta <= mem[addra];
    if (wea) mem[addra] <= dina;
    if (ceb) begin
      doutb <= mem[addrb];
      if (web) mem[addrb] <= dinb;
    end
  end

endmodule
