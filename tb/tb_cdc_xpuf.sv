// tb_cdc_xpuf: the CDC-7-XPUF core (32-bit variant here, to vary K) with
// a different random challenge per stream. Each component answer and the
// XORed response are compared with the additive delay model. Evaluations
// with a tied race in any stream are skipped. The response must take both
// values, and giving every stream the same challenge (a plain XOR PUF)
// must still be answered correctly.
module tb_cdc_xpuf;
  import puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned K = 32, S = 7, SEED = 9;

  logic                trig;
  logic [S-1:0][K-1:0] chal;
  logic [S-1:0]        comp;
  logic                resp;
  int checks = 0, failures = 0, ones = 0, ev = 0, ties = 0;

  cdc_xpuf #(.K(K), .STREAMS(S), .DEVICE_SEED(SEED)) dut (
    .trig_i(trig), .chal_i(chal), .comp_o(comp), .resp_o(resp));

  initial begin
    logic [S-1:0] exp_comp;
    logic         tie;
    longint       m;
    trig = 0;
    chal = '0;
    #1000;
    for (int i = 0; i < 400; i++) begin
      for (int s = 0; s < S; s++) chal[s] = K'(rand64());
      if (i >= 350) for (int s = 1; s < S; s++) chal[s] = chal[0];
      #2000;
      trig = 1;
      #10_000;
      tie = 0;
      for (int s = 0; s < S; s++) begin
        m = race_margin(SEED, s, K, 64'(chal[s]));
        tie |= (m == 0);
        exp_comp[s] = (m > 0);
      end
      if (tie) ties++;
      else begin
        ev++;
        checks += 2;
        if (comp != exp_comp) begin
          failures++;
          $display("FAIL components %b expected %b", comp, exp_comp);
        end
        if (resp != ^exp_comp) begin
          failures++;
          $display("FAIL response %b expected %b", resp, ^exp_comp);
        end
        ones += int'(resp);
      end
      trig = 0;
      #10_000;
    end
    $display("evaluated=%0d ones=%0d ties=%0d", ev, ones, ties);
    checks++;
    if (ones == 0 || ones == ev) begin
      failures++;
      $display("FAIL the response never changes");
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
