// apuf_arbiter: the arbiter at the end of an arbiter PUF.
//
// A D flip-flop whose data input is the top lane and whose clock is the
// bottom lane, as drawn for the design. When the rising edge on the bottom
// lane arrives, the flip-flop captures whether the top edge is already
// there: resp_o = 1 means the top path won the race, 0 that the bottom
// path won. An edge pair closer than the flip-flop's setup/hold window can
// go either way; that is the source of the PUF's small unsteadiness.
//
// Timing: resp_o changes right after the rising edge of bot_i and is
// asynchronous to any system clock; the reader must synchronise it.
module apuf_arbiter (
  input  logic top_i,   // top lane, flip-flop D input
  input  logic bot_i,   // bottom lane, flip-flop clock
  output logic resp_o   // 1: top edge arrived first
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge bot_i) resp_o <= top_i;
endmodule
