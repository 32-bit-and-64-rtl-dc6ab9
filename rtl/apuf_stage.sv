// apuf_stage: one switch stage of an arbiter PUF.
//
// Two 2:1 multiplexers share one challenge bit. With c_i = 1 each edge keeps
// its lane (top -> top, bottom -> bottom); with c_i = 0 the two edges swap
// lanes. Both multiplexers see both incoming edges, so the delay difference
// between the lanes accumulates stage by stage and its sign flips whenever
// the lanes cross.
//
// The two-multiplexer stage and the labelled 1/0 inputs follow the arbiter
// PUF structure of the design; which value of the bit means "straight" is
// this design's choice.
//
// Timing: purely combinational. Each of the four multiplexer input wires
// carries its own delay parameter (picoseconds), standing in for the
// device-specific routing delay that makes the PUF work. Synthesis ignores
// the delays. Change the challenge only while both lanes are idle (low).
module apuf_stage #(
  parameter int unsigned D_TOP_STRAIGHT = 60,  // top in    -> top mux, ps
  parameter int unsigned D_BOT_CROSS    = 60,  // bottom in -> top mux, ps
  parameter int unsigned D_TOP_CROSS    = 60,  // top in    -> bottom mux, ps
  parameter int unsigned D_BOT_STRAIGHT = 60   // bottom in -> bottom mux, ps
) (
  input  logic top_i,  // edge on the top lane
  input  logic bot_i,  // edge on the bottom lane
  input  logic c_i,    // challenge bit of this stage
  output logic top_o,
  output logic bot_o
);
  timeunit 1ps;
  timeprecision 1ps;

  // The two lanes carry the same logic value, so a synthesis tool would
  // merge them; keep every wire of the stage as drawn.
  (* keep = "true", dont_touch = "true" *) logic top_straight, bot_cross, top_cross, bot_straight;

  assign #(D_TOP_STRAIGHT) top_straight = top_i;
  assign #(D_BOT_CROSS)    bot_cross    = bot_i;
  assign #(D_TOP_CROSS)    top_cross    = top_i;
  assign #(D_BOT_STRAIGHT) bot_straight = bot_i;

  assign top_o = c_i ? top_straight : bot_cross;
  assign bot_o = c_i ? bot_straight : top_cross;
endmodule
