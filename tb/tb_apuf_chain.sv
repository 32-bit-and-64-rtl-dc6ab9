// tb_apuf_chain: one 64-stage arbiter PUF evaluated on random challenges.
// The expected answer comes from the additive delay model (puf_ref_pkg).
// Challenges whose race is a tie are not counted. Both answers must occur,
// and two chains with different device seeds must disagree on a good share
// of the challenges.
module tb_apuf_chain;
  import puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned K = 64;
  localparam int unsigned SEED_A = 3, SEED_B = 4, STREAM = 2;

  logic         trig;
  logic [K-1:0] chal;
  logic         resp_a, resp_b;
  int checks = 0, failures = 0, ones = 0, differ = 0, ties = 0, ev = 0;

  apuf_chain #(.K(K), .DEVICE_SEED(SEED_A), .STREAM(STREAM)) dut_a (
    .trig_i(trig), .chal_i(chal), .resp_o(resp_a));
  apuf_chain #(.K(K), .DEVICE_SEED(SEED_B), .STREAM(STREAM)) dut_b (
    .trig_i(trig), .chal_i(chal), .resp_o(resp_b));

  initial begin
    longint ma, mb;
    int n = 300;
    trig = 0;
    chal = '0;
    #1000;
    for (int i = 0; i < n; i++) begin
      chal = K'(rand64());
      if (i == 0) chal = '1;
      if (i == 1) chal = '0;
      #2000;
      trig = 1;
      #(20_000);
      ma = race_margin(SEED_A, STREAM, K, 64'(chal));
      mb = race_margin(SEED_B, STREAM, K, 64'(chal));
      if (ma == 0 || mb == 0) ties++;
      else begin
        checks += 2;
        if (resp_a != (ma > 0)) begin
          failures++;
          $display("FAIL chip A chal %h: resp %0b margin %0d", chal, resp_a, ma);
        end
        if (resp_b != (mb > 0)) begin
          failures++;
          $display("FAIL chip B chal %h: resp %0b margin %0d", chal, resp_b, mb);
        end
        ev++;
        ones += int'(resp_a);
        differ += int'(resp_a != resp_b);
      end
      trig = 0;
      #(20_000);
    end
    $display("ones=%0d differ=%0d ties=%0d of %0d", ones, differ, ties, n);
    checks++;
    if (ones == 0 || ones == ev) begin
      failures++;
      $display("FAIL the chain always gives the same answer");
    end
    checks++;
    if (differ < n / 10) begin
      failures++;
      $display("FAIL two device seeds behave almost alike");
    end
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
