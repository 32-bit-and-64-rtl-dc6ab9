// tb_apuf_arbiter: the D flip-flop arbiter must answer 1 when the top edge
// arrives before the bottom edge and 0 when it arrives after it, whatever
// its previous answer was. Random arrival orders and gaps are applied.
module tb_apuf_arbiter;
  timeunit 1ps;
  timeprecision 1ps;

  logic top_i, bot_i, resp_o;
  int checks = 0, failures = 0;

  apuf_arbiter dut (.*);

  initial begin
    int unsigned dt, db;
    top_i = 0; bot_i = 0;
    #100;
    for (int n = 0; n < 200; n++) begin
      dt = 1 + $urandom_range(0, 50);
      db = 1 + $urandom_range(0, 50);
      if (n < 2) begin dt = (n == 0) ? 5 : 30; db = 15; end  // one of each first
      if (dt == db) db++;
      fork
        begin #(dt); top_i = 1; end
        begin #(db); bot_i = 1; end
      join
      #10;
      checks++;
      if (resp_o != (dt < db)) begin
        failures++;
        $display("FAIL top at %0d bottom at %0d: resp %0b", dt, db, resp_o);
      end
      top_i = 0; bot_i = 0;
      #20;
      // A falling edge on the clock lane must not change the answer.
      checks++;
      if (resp_o != (dt < db)) begin
        failures++;
        $display("FAIL answer changed while lanes returned low");
      end
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
