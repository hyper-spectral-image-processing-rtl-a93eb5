// pcore: user core of the board, the exchange RAM plus the wavelet controller.
//
// The host side (port A of the RAM) runs every host-clock cycle: a host write
// stores its 64-bit word at addr[7:0], and the word at addr[7:0] appears on
// `dout` one cycle after the address. Two addresses are also commands:
//   write to word 4  starts one controller iteration,
//   write to word 5  resets the controller (state, start request, finish).
// A start command is held in a request flag until the controller, which only
// moves on divided-clock enables, takes it; a command therefore cannot be
// lost between two enables. The controller uses port B.
//
// Ports: host-clock `clk`, divided clock enable `ce`, board reset `rst`, the
// host `write` strobe with `addr`/`din`, read data `dout`, and `finish` from
// the controller. Only addr[7:0] is decoded, as in the original design, so
// the RAM repeats every 256 words of the 14-bit address. The start command
// and the port assignment follow the original design; the reset command
// follows its description, and the held start request is this
// implementation's choice.
module pcore
  import hsi_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        write,
  input  logic [13:0] addr,
  input  word_t       din,
  output word_t       dout,
  output logic        finish
);

  logic  start_cmd, reset_cmd, start_req, start_ack;
  addr_t addrb;
  word_t dinb, doutb;
  logic  web;

  assign start_cmd = write && (addr[ADDR_W-1:0] == A_START);
  assign reset_cmd = write && (addr[ADDR_W-1:0] == A_RESET);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                  start_req <= 1'b0;
    else if (reset_cmd)       start_req <= 1'b0;
    else if (start_cmd)       start_req <= 1'b1;
    else if (start_ack)       start_req <= 1'b0;
  end

  dpram256_64 u_ram (
    .clk,
    .addra(addr[ADDR_W-1:0]), .dina(din), .wea(write), .douta(dout),
    .ceb(ce), .addrb(addrb), .dinb(dinb), .web(web), .doutb(doutb)
  );

  parith u_parith (
    .clk, .rst, .ce,
    .srst(reset_cmd),
    .start(start_req),
    .start_ack(start_ack),
    .addr(addrb), .din(dinb), .dout(doutb), .we(web),
    .finish(finish)
  );

endmodule
