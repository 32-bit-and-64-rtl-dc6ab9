// cdc_pkg: constants and helper functions shared by the CDC-7-XPUF design.
//
// * PRNG constants. The component challenges are produced by the linear
//   congruential generator C(n+1) = (a * C(n) + g) mod 2^K, K being the number
//   of stages of one arbiter chain. The generator form is the design's; the
//   values of a and g are this design's choice (the published full-period
//   constants of Knuth's MMIX generator for K = 64 and of the Numerical
//   Recipes generator for K = 32; other K use the low bits of the 64-bit pair).
// * Mailbox layout of the dual access BRAM that carries challenges from the
//   processor to the programmable logic and responses back (own choice).
// * Wire-delay model. An arbiter PUF works because the two nominally equal
//   paths of every stage differ by a few picoseconds from chip to chip.
//   Simulation has no process variation, so every multiplexer input wire gets
//   a delay of DELAY_BASE_PS plus a pseudo-random 0..DELAY_SPREAD_PS-1 ps
//   taken from a hash of (device seed, stream, stage, wire). Synthesis
//   ignores these delays; in silicon the routed wires take their place.
package cdc_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Number of component arbiter PUFs (streams) of a CDC-7-XPUF.
  localparam int unsigned STREAMS_DEFAULT = 7;
  // Response length per challenge, in bits.
  localparam int unsigned RESP_BITS_DEFAULT = 128;

  // ---------------------------------------------------------------- PRNG
  localparam logic [63:0] LCG_A64 = 64'h5851_F42D_4C95_7F2D;  // 6364136223846793005
  localparam logic [63:0] LCG_G64 = 64'h1405_7B7E_F767_814F;  // 1442695040888963407
  localparam logic [31:0] LCG_A32 = 32'h0019_660D;            // 1664525
  localparam logic [31:0] LCG_G32 = 32'h3C6E_F35F;            // 1013904223

  // Multiplier a for a K-bit generator (returned in the low K bits).
  function automatic logic [63:0] lcg_a(int unsigned k);
    return (k == 32) ? {32'h0, LCG_A32} : LCG_A64;
  endfunction

  // Increment g for a K-bit generator (returned in the low K bits).
  function automatic logic [63:0] lcg_g(int unsigned k);
    return (k == 32) ? {32'h0, LCG_G32} : LCG_G64;
  endfunction

  // ---------------------------------------------------------------- BRAM map
  // Word addresses of the 32-bit mailbox. The processor writes the challenge
  // count, the seed challenges (K/32 words each, least significant word
  // first) and then a new non-zero token into MB_CMD. The logic answers with
  // RESP_BITS/32 words per challenge and finally copies the token to MB_DONE.
  localparam int unsigned MB_CMD      = 0;
  localparam int unsigned MB_COUNT    = 1;
  localparam int unsigned MB_DONE     = 2;
  localparam int unsigned MB_CH_BASE  = 16;
  localparam int unsigned MB_RSP_BASE = 1024;

  // ---------------------------------------------------------------- delays
  localparam int unsigned DELAY_BASE_PS   = 60;
  localparam int unsigned DELAY_SPREAD_PS = 40;

  // Wire index inside one stage: which input wire of which multiplexer.
  typedef enum logic [1:0] {
    W_TOP_STRAIGHT = 2'd0,  // top input  -> top output    (challenge bit 1)
    W_BOT_CROSS    = 2'd1,  // bottom in  -> top output    (challenge bit 0)
    W_TOP_CROSS    = 2'd2,  // top input  -> bottom output (challenge bit 0)
    W_BOT_STRAIGHT = 2'd3   // bottom in  -> bottom output (challenge bit 1)
  } wire_e;

  function automatic int unsigned wire_delay_ps(int unsigned seed, int unsigned stream,
                                                int unsigned stage, wire_e wire_idx);
    logic [31:0] h;
    h = (seed * 32'h9E37_79B1) ^ (stream * 32'h85EB_CA77) ^
        (stage * 32'hC2B2_AE3D) ^ (32'(wire_idx) * 32'h27D4_EB2F) ^ 32'h1656_67B1;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return DELAY_BASE_PS + (h % DELAY_SPREAD_PS);
  endfunction
endpackage
