// parith: eleven-state controller of one wavelet iteration.
//
// One iteration reads eight pixels from RAM words 0..3, filters them as two
// independent four-pixel windows in two fxmult units, writes both low-pass
// results to word 7, folds them into the running maximum and writes
// {counter+1, maximum} back to word 6. The counter lets the host see that an
// iteration has completed.
//
// The controller works through RAM port B, whose reads take two cycles from
// issuing an address to holding its data, and it is built to keep that port
// busy every cycle ("pipeline model B"). Per divided-clock cycle:
//   S0  idle; leaves on `start` (acknowledged with `start_ack`)
//   S1  issue word 0          S2  issue word 1
//   S3  issue word 2, take word 0 -> a0,a1
//   S4  issue word 3, take word 1 -> a2,a3
//   S5  issue word 6, take word 2 -> b0,b1; fxmult A computes
//   S6  take word 3 -> b2,b3                 (result A ready)
//   S7  take word 6 -> counter, old maximum; fxmult B computes
//   S8  results to the max unit; write {A,B} to word 7 is issued (result B ready)
//   S9  write of word 7 takes place; max stage 1
//   S10 write of word 6 is issued; max stage 2; `finish` is raised
// and the {counter+1, maximum} word is written in the following S0.
// Eleven enabled cycles from start to finish; a new start is taken in S0, so
// back-to-back iterations also take eleven.
//
// Interface: all registers use `clk`, and the controller advances only on
// edges where `ce` (the divided clock enable) is high. `srst` is the host's
// reset command, synchronous and acting on any edge; `rst` is the board reset.
// The state sequence, the read/write schedule and the word layout follow the
// original design; the clock enable, the start acknowledge and the counter
// increment are this implementation's choices.
module parith
  import hsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ce,
  input  logic  srst,
  input  logic  start,
  output logic  start_ack,
  // RAM port B
  output addr_t addr,
  output word_t din,
  input  word_t dout,
  output logic  we,
  output logic  finish
);

  pstate_t state;
  addr_t   idx;
  pix_t    a0, a1, a2, a3, b0, b1, b2, b3;
  pix_t    qa, qb, num1, num2, oldmax, newmax;
  logic [PIX_W-1:0] count;

  assign start_ack = ce && (state == S0) && start && !srst;

  fxmult u_fxa (
    .clk, .rst, .en(ce && state == S5),
    .a0(a0), .a1(a1), .a2(a2), .a3(a3), .q(qa)
  );

  fxmult u_fxb (
    .clk, .rst, .en(ce && state == S7),
    .a0(b0), .a1(b1), .a2(b2), .a3(b3), .q(qb)
  );

  max_unit u_max (
    .clk, .rst, .en(ce),
    .num1(num1), .num2(num2), .oldmax(oldmax), .newmax(newmax)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state  <= S0;
      idx    <= '0;
      we     <= 1'b0;
      finish <= 1'b0;
      {a0, a1, a2, a3, b0, b1, b2, b3} <= '0;
      {num1, num2, oldmax, count} <= '0;
    end else if (srst) begin
      state  <= S0;
      we     <= 1'b0;
      finish <= 1'b0;
    end else if (ce) begin
      we <= 1'b0;
      unique case (state)
        S0:  if (start) begin state <= S1; finish <= 1'b0; end
        S1:  begin idx <= A_IN0; state <= S2; end
        S2:  begin idx <= A_IN1; state <= S3; end
        S3:  begin idx <= A_IN2; {a0, a1} <= dout; state <= S4; end
        S4:  begin idx <= A_IN3; {a2, a3} <= dout; state <= S5; end
        S5:  begin idx <= A_MAX; {b0, b1} <= dout; state <= S6; end
        S6:  begin {b2, b3} <= dout; state <= S7; end
        S7:  begin {count, oldmax} <= dout; state <= S8; end
        S8:  begin num1 <= qa; num2 <= qb; idx <= A_RES; we <= 1'b1; state <= S9; end
        S9:  state <= S10;
        S10: begin idx <= A_MAX; we <= 1'b1; finish <= 1'b1; state <= S0; end
        default: state <= S0;
      endcase
    end
  end

  assign addr = idx;
  // Word 7 is written while the controller is in S9, word 6 in the S0 after.
  assign din  = (state == S9) ? {qa, qb} : {count + 1'b1, newmax};

  // A write only ever happens to word 7 in S9 or to word 6 in S0.
  a_write_slot: assert property (@(posedge clk) disable iff (rst)
    we |-> ((state == S9 && idx == A_RES) || (state == S0 && idx == A_MAX)));

endmodule
