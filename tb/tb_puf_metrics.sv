// tb_puf_metrics: the evaluation campaign of the design, scaled down to a
// simulation. Three simulated chips (device seeds 1, 2, 3) of the 32-bit
// CDC-7-XPUF core answer NCH seed challenges with
// 128-bit responses; response bit b uses PRNG values C(7b+1)..C(7b+7) of
// the seed, as the wrapper does. Every bit is checked against the additive
// delay model, then three of the metrics are computed from the responses:
//   uniformity  U  = fraction of ones                       (ideal 0.5)
//   diffuseness D  = 4/(K^2 L) * sum over response pairs of HD (ideal 1)
//   uniqueness  Uk = mean pairwise HD/L between chips        (ideal 0.5)
// and required to lie in broad bands around the ideal. The simulation has
// no noise, so steadiness and correctness are 1 by construction and are
// not computed.
module tb_puf_metrics;
  import puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned S = 7, RB = 128, NCH = 3, NDEV = 3;

  logic trig = 0;
  logic [S-1:0][31:0] chal32;
  logic [NDEV-1:0] resp32;
  logic [NDEV-1:0][S-1:0] comp32;
  int checks = 0, failures = 0, ties = 0;

  for (genvar d = 0; d < NDEV; d++) begin : g_dev
    cdc_xpuf #(.K(32), .STREAMS(S), .DEVICE_SEED(d + 1)) u_x32 (
      .trig_i(trig), .chal_i(chal32), .comp_o(comp32[d]), .resp_o(resp32[d]));
  end

  logic [RB-1:0] r32 [NDEV][NCH];

  function automatic logic model(int unsigned seed, int unsigned k, logic [63:0] c [S], output logic tie);
    logic r = 0;
    longint m;
    tie = 0;
    for (int s = 0; s < S; s++) begin
      m = race_margin(seed, s, k, c[s]);
      r ^= (m > 0);
      tie |= (m == 0);
    end
    return r;
  endfunction

  function automatic real uniformity(logic [RB-1:0] r [NDEV][NCH], int d);
    int ones = 0;
    for (int i = 0; i < NCH; i++) ones += $countones(r[d][i]);
    return real'(ones) / real'(NCH * RB);
  endfunction

  function automatic real diffuseness(logic [RB-1:0] r [NDEV][NCH], int d);
    int hd = 0;
    for (int i = 0; i < NCH - 1; i++)
      for (int j = i + 1; j < NCH; j++) hd += $countones(r[d][i] ^ r[d][j]);
    return 4.0 * real'(hd) / (real'(NCH * NCH) * real'(RB));
  endfunction

  function automatic real uniqueness(logic [RB-1:0] r [NDEV][NCH]);
    real sum = 0.0;
    for (int c = 0; c < NCH; c++)
      for (int i = 0; i < NDEV - 1; i++)
        for (int j = i + 1; j < NDEV; j++)
          sum += real'($countones(r[i][c] ^ r[j][c])) / real'(RB);
    return 2.0 * sum / (real'(NDEV * (NDEV - 1)) * real'(NCH));
  endfunction

  task automatic band(string what, real v, real lo, real hi);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL %s = %0.4f outside [%0.2f, %0.2f]", what, v, lo, hi);
    end
  endtask

  initial begin
    logic [63:0] x32;
    logic [63:0] c32 [S];
    logic e, tie;
    for (int ch = 0; ch < NCH; ch++) begin
      x32 = 64'($urandom());
      for (int b = 0; b < RB; b++) begin
        for (int s = 0; s < S; s++) begin
          x32 = lcg_ref(32, x32); c32[s] = x32; chal32[s] = x32[31:0];
        end
        #2000;
        trig = 1;
        #15_000;
        for (int d = 0; d < NDEV; d++) begin
          r32[d][ch][b] = resp32[d];
          e = model(d + 1, 32, c32, tie);
          if (tie) ties++;
          else begin
            checks++;
            if (resp32[d] != e) begin failures++; $display("FAIL 32-bit chip %0d bit %0d", d, b); end
          end
        end
        trig = 0;
        #15_000;
      end
    end
    for (int d = 0; d < NDEV; d++) begin
      $display("chip %0d: uniformity %0.4f diffuseness %0.4f",
               d + 1, uniformity(r32, d), diffuseness(r32, d));
      band("32-bit uniformity", uniformity(r32, d), 0.35, 0.65);
      band("32-bit diffuseness", diffuseness(r32, d), 0.55, 0.95);
    end
    $display("uniqueness %0.4f (ties skipped: %0d)", uniqueness(r32), ties);
    band("32-bit uniqueness", uniqueness(r32), 0.30, 0.70);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
