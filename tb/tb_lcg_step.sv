// tb_lcg_step: one PRNG step at both challenge widths of the design
// (64-bit and 32-bit) against Eq. (1) computed in 64-bit arithmetic,
// on fixed and random inputs, plus a known value of each generator.
module tb_lcg_step;
  import puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic [63:0] c64, n64;
  logic [31:0] c32, n32;
  int checks = 0, failures = 0;

  lcg_step #(.K(64)) dut64 (.c_i(c64), .c_o(n64));
  lcg_step #(.K(32)) dut32 (.c_i(c32), .c_o(n32));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // Known first outputs from seed 0 and 1.
    c64 = 64'd0; c32 = 32'd0; #1;
    check("64-bit from 0", n64, 64'd1442695040888963407);
    check("32-bit from 0", 64'(n32), 64'd1013904223);
    c64 = 64'd1; c32 = 32'd1; #1;
    check("64-bit from 1", n64, 64'd7806831264735756412);
    check("32-bit from 1", 64'(n32), 64'd1015568748);
    for (int i = 0; i < 500; i++) begin
      c64 = rand64();
      c32 = $urandom();
      #1;
      check("64-bit step", n64, lcg_ref(64, c64));
      check("32-bit step", 64'(n32), lcg_ref(32, 64'(c32)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
