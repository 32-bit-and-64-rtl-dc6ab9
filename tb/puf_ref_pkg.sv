// puf_ref_pkg: reference models used by the testbenches.
//
// race_margin() evaluates one arbiter chain with the additive delay model:
// the arrival times of the two lanes are summed stage by stage from the
// per-wire delays of cdc_pkg::wire_delay_ps, swapping lanes where the
// challenge bit is 0. The result is t_bottom - t_top in ps: positive means
// the top edge wins and the arbiter answers 1, zero is a tie with no
// defined answer. lcg_ref() is Eq. (1) in 64-bit unsigned arithmetic.
package puf_ref_pkg;
  import cdc_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  function automatic longint race_margin(int unsigned seed, int unsigned stream,
                                         int unsigned k, logic [63:0] chal);
    longint t_top = 0, t_bot = 0, nt, nb;
    for (int unsigned i = 0; i < k; i++) begin
      if (chal[i]) begin
        nt = t_top + longint'(wire_delay_ps(seed, stream, i, W_TOP_STRAIGHT));
        nb = t_bot + longint'(wire_delay_ps(seed, stream, i, W_BOT_STRAIGHT));
      end else begin
        nt = t_bot + longint'(wire_delay_ps(seed, stream, i, W_BOT_CROSS));
        nb = t_top + longint'(wire_delay_ps(seed, stream, i, W_TOP_CROSS));
      end
      t_top = nt;
      t_bot = nb;
    end
    return t_bot - t_top;
  endfunction

  function automatic logic [63:0] lcg_ref(int unsigned k, logic [63:0] c);
    longint unsigned a, g, x;
    a = (k == 32) ? 64'd1664525 : 64'd6364136223846793005;
    g = (k == 32) ? 64'd1013904223 : 64'd1442695040888963407;
    x = a * longint'(c) + g;
    if (k < 64) x = x & ((64'd1 << k) - 1);
    return x;
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction
endpackage
