// tb_challenge_gen: loads random seeds and requests several challenge sets.
// Each set must hold the next STREAMS values of Eq. (1) in stream order,
// must be complete exactly STREAMS cycles after the request (done_o), and a
// request while busy must be ignored. Reloading a seed restarts the
// sequence. Run at 64 bits with the default 7 streams.
module tb_challenge_gen;
  import puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned K = 64, S = 7;

  logic clk = 0, rst_n = 0, load = 0, next = 0;
  logic [K-1:0] seed = '0;
  logic busy, done, ready;
  logic [S-1:0][K-1:0] chal;
  int checks = 0, failures = 0;

  challenge_gen #(.K(K), .STREAMS(S)) dut (
    .clk_i(clk), .rst_ni(rst_n), .load_i(load), .seed_i(seed), .next_i(next),
    .busy_o(busy), .done_o(done), .ready_o(ready), .chal_o(chal));

  always #4000 clk = ~clk;  // 125 MHz

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [63:0] x;
    int cycles;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      @(negedge clk);
      seed = rand64();
      load = 1;
      @(negedge clk);
      load = 0;
      check("ready cleared by load", 64'(ready), 0);
      x = seed;
      for (int set = 0; set < 5; set++) begin
        @(negedge clk);
        next = 1;
        @(negedge clk);
        next = (set == 2);  // a second request while busy must be ignored
        cycles = 1;
        @(negedge clk);
        next = 0;
        while (!done && cycles < 50) begin
          @(negedge clk);
          cycles++;
        end
        check("cycles from request to done", 64'(cycles), 64'(S));
        check("ready with the set", 64'(ready), 1);
        for (int s = 0; s < S; s++) begin
          x = lcg_ref(K, x);
          check($sformatf("run %0d set %0d stream %0d", run, set, s), chal[s], x);
        end
        @(negedge clk);
        check("done is one cycle", 64'(done), 0);
        check("idle after the set", 64'(busy), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
