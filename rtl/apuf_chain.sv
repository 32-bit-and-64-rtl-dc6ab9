// apuf_chain: one component arbiter PUF (one "stream") of the XOR PUF.
//
// The trigger edge is split into two lanes that run through K switch
// stages (apuf_stage), stage k steered by challenge bit k, and end in the
// D flip-flop arbiter (apuf_arbiter). The response bit tells which lane was
// faster for this challenge.
//
// The chain structure follows the design. The per-wire simulation delays
// come from cdc_pkg::wire_delay_ps(DEVICE_SEED, STREAM, k, wire): a chain
// with another DEVICE_SEED behaves like the same circuit on another chip.
// Synthesis ignores them.
//
// Timing: set chal_i while trig_i is low, raise trig_i, and read resp_o
// once the slower edge has left the last stage (K stages of roughly
// DELAY_BASE_PS..DELAY_BASE_PS+DELAY_SPREAD_PS each in simulation). Lower
// trig_i and let both lanes return low before the next challenge.
module apuf_chain
  import cdc_pkg::*;
#(
  parameter int unsigned K           = 64,  // stages = challenge bits
  parameter int unsigned DEVICE_SEED = 1,   // simulated chip instance
  parameter int unsigned STREAM      = 0    // index of this stream in the XPUF
) (
  input  logic         trig_i,
  input  logic [K-1:0] chal_i,
  output logic         resp_o
);
  timeunit 1ps;
  timeprecision 1ps;

  // Both lanes are logically equal; keep them apart through synthesis.
  (* keep = "true", dont_touch = "true" *) logic [K:0] top_lane, bot_lane;

  assign top_lane[0] = trig_i;
  assign bot_lane[0] = trig_i;

  for (genvar k = 0; k < K; k++) begin : g_stage
    apuf_stage #(
      .D_TOP_STRAIGHT(wire_delay_ps(DEVICE_SEED, STREAM, k, W_TOP_STRAIGHT)),
      .D_BOT_CROSS   (wire_delay_ps(DEVICE_SEED, STREAM, k, W_BOT_CROSS)),
      .D_TOP_CROSS   (wire_delay_ps(DEVICE_SEED, STREAM, k, W_TOP_CROSS)),
      .D_BOT_STRAIGHT(wire_delay_ps(DEVICE_SEED, STREAM, k, W_BOT_STRAIGHT))
    ) u_stage (
      .top_i(top_lane[k]),
      .bot_i(bot_lane[k]),
      .c_i  (chal_i[k]),
      .top_o(top_lane[k+1]),
      .bot_o(bot_lane[k+1])
    );
  end

  apuf_arbiter u_arbiter (
    .top_i (top_lane[K]),
    .bot_i (bot_lane[K]),
    .resp_o(resp_o)
  );
endmodule
