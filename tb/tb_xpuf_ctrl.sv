// tb_xpuf_ctrl: the wrapper state machine with the real BRAM and challenge
// generator, and a stand-in PUF whose answer is a fixed parity function of
// the component challenges, given a few ns after the trigger rises. A host
// process plays the processor: it posts jobs through BRAM port A and polls
// the done word. Checked: every response bit against the reference
// (Eq. (1) sequence + parity), the cycle count of one evaluation, that the
// challenges never change while the trigger is high, that a repeated token
// starts nothing, that a zero-count job completes, and that an oversized
// count is clamped to what the mailbox holds. Run with 32-bit challenges
// and 32-bit responses to keep the clamped job short.
module tb_xpuf_ctrl;
  import cdc_pkg::*;
  import puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned K = 32, S = 7, RB = 32, AW = 11, DW = 32;
  localparam int unsigned EVAL = 3, IDLE = 2;
  localparam int unsigned EVAL_PERIOD = S + EVAL + IDLE + 2;
  localparam int unsigned MAX_BATCH = 1008;  // (1024 - 16) / 1 word per challenge

  logic clk = 0, rst_n = 0;
  logic a_en = 0, a_we = 0;
  logic [AW-1:0] a_addr = '0;
  logic [DW-1:0] a_wdata = '0, a_rdata;
  logic b_en, b_we;
  logic [AW-1:0] b_addr;
  logic [DW-1:0] b_wdata, b_rdata;
  logic gen_load, gen_next, gen_done, gen_busy, gen_ready;
  logic [K-1:0] gen_seed;
  logic [S-1:0][K-1:0] chal;
  logic trig, resp = 0, busy, eval;
  int checks = 0, failures = 0;
  int n_eval = 0, n_jobs = 0, n_repeat_ignored = 0, n_zero = 0, n_clamp = 0;

  dual_port_bram #(.AW(AW), .DW(DW)) u_bram (
    .clk_i(clk),
    .a_en_i(a_en), .a_we_i(a_we), .a_addr_i(a_addr), .a_wdata_i(a_wdata), .a_rdata_o(a_rdata),
    .b_en_i(b_en), .b_we_i(b_we), .b_addr_i(b_addr), .b_wdata_i(b_wdata), .b_rdata_o(b_rdata));

  xpuf_ctrl #(.K(K), .RESP_BITS(RB), .AW(AW), .DW(DW),
              .EVAL_CYCLES(EVAL), .IDLE_CYCLES(IDLE)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .bram_en_o(b_en), .bram_we_o(b_we), .bram_addr_o(b_addr), .bram_wdata_o(b_wdata),
    .bram_rdata_i(b_rdata),
    .gen_load_o(gen_load), .gen_seed_o(gen_seed), .gen_next_o(gen_next), .gen_done_i(gen_done),
    .trig_o(trig), .resp_i(resp), .busy_o(busy), .eval_o(eval));

  challenge_gen #(.K(K), .STREAMS(S)) u_gen (
    .clk_i(clk), .rst_ni(rst_n), .load_i(gen_load), .seed_i(gen_seed), .next_i(gen_next),
    .busy_o(gen_busy), .done_o(gen_done), .ready_o(gen_ready), .chal_o(chal));

  always #4000 clk = ~clk;

  // Stand-in PUF: a parity of the component challenges.
  function automatic logic puf_f(logic [S-1:0][K-1:0] c);
    return ^(c[0] & 32'h0123_4567) ^ c[3][5] ^ c[6][31] ^ ^(c[2] & 32'h8000_0101);
  endfunction
  always @(posedge trig) begin
    #3000;
    resp = puf_f(chal);
  end

  // The challenges must be stable while the trigger is high.
  always @(chal) if (trig) begin
    failures++;
    $display("FAIL challenges changed while the trigger was high");
  end

  // Cycle count of one evaluation: spacing of the eval_o pulses.
  int unsigned last_eval_cycle = 0, cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (eval) begin
      n_eval++;
      if (last_eval_cycle != 0 && cycle - last_eval_cycle <= EVAL_PERIOD + 1) begin
        checks++;
        if (cycle - last_eval_cycle != EVAL_PERIOD) begin
          failures++;
          $display("FAIL evaluation period %0d cycles, expected %0d",
                   cycle - last_eval_cycle, EVAL_PERIOD);
        end
      end
      last_eval_cycle = cycle;
    end
  end

  task automatic wr(int unsigned addr, logic [DW-1:0] d);
    @(negedge clk);
    a_en = 1; a_we = 1; a_addr = AW'(addr); a_wdata = d;
    @(negedge clk);
    a_en = 0; a_we = 0;
  endtask

  task automatic rd(int unsigned addr, output logic [DW-1:0] d);
    @(negedge clk);
    a_en = 1; a_we = 0; a_addr = AW'(addr);
    @(negedge clk);
    a_en = 0;
    d = a_rdata;
  endtask

  // Post a job and wait for its token in MB_DONE.
  task automatic run_job(logic [DW-1:0] token, int unsigned count, int unsigned timeout_cycles);
    logic [DW-1:0] d;
    int unsigned waited = 0;
    wr(MB_COUNT, count);
    wr(MB_CMD, token);
    do begin
      repeat (20) @(negedge clk);
      waited += 22;
      rd(MB_DONE, d);
    end while (d != token && waited < timeout_cycles);
    checks++;
    if (d != token) begin
      failures++;
      $display("FAIL job %h did not finish", token);
    end else n_jobs++;
  endtask

  function automatic logic [RB-1:0] expected(logic [K-1:0] seed);
    logic [63:0] x = 64'(seed);
    logic [S-1:0][K-1:0] c;
    logic [RB-1:0] r;
    for (int b = 0; b < RB; b++) begin
      for (int s = 0; s < S; s++) begin
        x = lcg_ref(K, x);
        c[s] = K'(x);
      end
      r[b] = puf_f(c);
    end
    return r;
  endfunction

  logic [K-1:0] seeds [MAX_BATCH + 8];

  task automatic post_seeds(int unsigned n);
    for (int i = 0; i < n; i++) begin
      seeds[i] = K'(rand64());
      wr(MB_CH_BASE + i, seeds[i]);
    end
  endtask

  task automatic check_responses(int unsigned first, int unsigned n);
    logic [DW-1:0] d;
    for (int i = first; i < first + n; i++) begin
      rd(MB_RSP_BASE + i, d);
      checks++;
      if (d != expected(seeds[i])) begin
        failures++;
        $display("FAIL response %0d: %h expected %h", i, d, expected(seeds[i]));
      end
    end
  endtask

  initial begin
    logic [DW-1:0] d;
    // Clear the mailbox words the test reads.
    wr(MB_CMD, 0); wr(MB_DONE, 0);
    for (int i = 0; i < 4; i++) wr(MB_RSP_BASE + i, 0);
    wr(MB_RSP_BASE + MAX_BATCH, 32'hDEAD_BEEF);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Job 1: three challenges.
    post_seeds(3);
    run_job(32'h0000_0001, 3, 100_000);
    check_responses(0, 3);
    // The same token again: nothing may happen.
    wr(MB_RSP_BASE, 0);
    wr(MB_CMD, 32'h0000_0001);
    repeat (200) @(negedge clk);
    rd(MB_RSP_BASE, d);
    checks++;
    if (d != 0 || busy) begin
      failures++;
      $display("FAIL a repeated token started a job");
    end else n_repeat_ignored++;
    // Zero-count job: completes at once.
    run_job(32'h0000_0002, 0, 1000);
    n_zero++;
    // Oversized job: clamped to what the mailbox holds.
    post_seeds(MAX_BATCH);
    run_job(32'h0000_0003, 5000, MAX_BATCH * RB * EVAL_PERIOD * 2);
    check_responses(0, 2);
    check_responses(MAX_BATCH - 2, 2);
    rd(MB_RSP_BASE + MAX_BATCH, d);
    checks++;
    if (d != 32'hDEAD_BEEF) begin
      failures++;
      $display("FAIL the clamped job wrote past the response area");
    end else n_clamp++;
    $display("jobs=%0d evaluations=%0d repeat_ignored=%0d zero_jobs=%0d clamped=%0d",
             n_jobs, n_eval, n_repeat_ignored, n_zero, n_clamp);
    checks++;
    if (n_eval != (3 + MAX_BATCH) * RB) begin
      failures++;
      $display("FAIL %0d evaluations, expected %0d", n_eval, (3 + MAX_BATCH) * RB);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
