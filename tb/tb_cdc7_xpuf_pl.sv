// tb_cdc7_xpuf_pl: end-to-end test of the programmable-logic top at its
// default size (64-bit CDC-7-XPUF, 128-bit responses). A host process plays
// the processor on BRAM port A. It posts a job of two random seed
// challenges, waits for the done token and compares every response bit
// with the reference: the Eq. (1) challenge sequence fed through the
// additive delay model of the seven chains, XORed. Bits where any chain
// has a tied race are not checked. It then repeats the first challenge (the
// PUF must give the same response again), re-sends an old token (nothing may
// happen) and sends an empty job. Each mechanism is counted and must occur.
module tb_cdc7_xpuf_pl;
  import cdc_pkg::*;
  import puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned K = 64, S = 7, RB = 128, AW = 11, DW = 32;
  localparam int unsigned CW = K / DW, RW = RB / DW;
  localparam int unsigned SEED = 1;  // the top's default DEVICE_SEED
  localparam int unsigned NCH = 2;

  logic clk = 0, rst_n = 0;
  logic ps_en = 0, ps_we = 0;
  logic [AW-1:0] ps_addr = '0;
  logic [DW-1:0] ps_wdata = '0, ps_rdata;
  logic busy;
  int checks = 0, failures = 0;
  int n_jobs = 0, n_bits = 0, n_ties = 0, n_repeat_same = 0, n_token_ignored = 0, n_empty = 0;
  int n_ones = 0;

  cdc7_xpuf_pl dut (
    .clk_i(clk), .rst_ni(rst_n),
    .ps_en_i(ps_en), .ps_we_i(ps_we), .ps_addr_i(ps_addr), .ps_wdata_i(ps_wdata),
    .ps_rdata_o(ps_rdata), .busy_o(busy));

  always #4000 clk = ~clk;  // 125 MHz from the processor side

  task automatic wr(int unsigned addr, logic [DW-1:0] d);
    @(negedge clk);
    ps_en = 1; ps_we = 1; ps_addr = AW'(addr); ps_wdata = d;
    @(negedge clk);
    ps_en = 0; ps_we = 0;
  endtask

  task automatic rd(int unsigned addr, output logic [DW-1:0] d);
    @(negedge clk);
    ps_en = 1; ps_we = 0; ps_addr = AW'(addr);
    @(negedge clk);
    ps_en = 0;
    d = ps_rdata;
  endtask

  task automatic run_job(logic [DW-1:0] token, int unsigned count);
    logic [DW-1:0] d;
    int unsigned waited = 0;
    wr(MB_COUNT, count);
    wr(MB_CMD, token);
    do begin
      repeat (100) @(negedge clk);
      waited += 102;
      rd(MB_DONE, d);
    end while (d != token && waited < 100_000);
    checks++;
    if (d != token) begin
      failures++;
      $display("FAIL job %h did not finish", token);
    end else n_jobs++;
  endtask

  // Reference response of one seed challenge, and the mask of decidable bits.
  task automatic expected(logic [K-1:0] seed, output logic [RB-1:0] r, output logic [RB-1:0] valid);
    logic [63:0] x = 64'(seed);
    longint m;
    for (int b = 0; b < RB; b++) begin
      r[b] = 0;
      valid[b] = 1;
      for (int s = 0; s < S; s++) begin
        x = lcg_ref(K, x);
        m = race_margin(SEED, s, K, x);
        r[b] ^= (m > 0);
        if (m == 0) valid[b] = 0;
      end
    end
  endtask

  logic [K-1:0]  seeds [NCH];
  logic [RB-1:0] got_first [NCH];

  task automatic read_response(int unsigned i, output logic [RB-1:0] r);
    logic [DW-1:0] d;
    for (int w = 0; w < RW; w++) begin
      rd(MB_RSP_BASE + i * RW + w, d);
      r[w*DW +: DW] = d;
    end
  endtask

  initial begin
    logic [RB-1:0] got, exp_r, valid;
    logic [DW-1:0] d;
    wr(MB_CMD, 0); wr(MB_DONE, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NCH; i++) begin
      seeds[i] = K'(rand64());
      for (int w = 0; w < CW; w++) wr(MB_CH_BASE + i * CW + w, seeds[i][w*DW +: DW]);
    end
    run_job(32'h0000_00A1, NCH);
    for (int i = 0; i < NCH; i++) begin
      read_response(i, got);
      got_first[i] = got;
      expected(seeds[i], exp_r, valid);
      for (int b = 0; b < RB; b++) begin
        if (!valid[b]) begin n_ties++; continue; end
        checks++;
        n_bits++;
        n_ones += int'(got[b]);
        if (got[b] != exp_r[b]) begin
          failures++;
          $display("FAIL challenge %0d bit %0d: %0b expected %0b", i, b, got[b], exp_r[b]);
        end
      end
    end
    // Same challenges again: a PUF without noise answers identically.
    run_job(32'h0000_00A2, 1);
    for (int i = 0; i < 1; i++) begin
      read_response(i, got);
      checks++;
      if (got != got_first[i]) begin
        failures++;
        $display("FAIL repeated challenge %0d gave another response", i);
      end else n_repeat_same++;
    end
    // An old token must start nothing.
    wr(MB_RSP_BASE, 0);
    wr(MB_CMD, 32'h0000_00A2);
    repeat (300) @(negedge clk);
    rd(MB_RSP_BASE, d);
    checks++;
    if (d != 0 || busy) begin
      failures++;
      $display("FAIL an old token started a job");
    end else n_token_ignored++;
    // An empty job.
    run_job(32'h0000_00A3, 0);
    n_empty++;
    $display("jobs=%0d bits_checked=%0d ones=%0d ties=%0d repeats_equal=%0d old_token_ignored=%0d empty_jobs=%0d",
             n_jobs, n_bits, n_ones, n_ties, n_repeat_same, n_token_ignored, n_empty);
    checks++;
    if (n_jobs != 3 || n_bits == 0 || n_ones == 0 || n_ones == n_bits || n_repeat_same != 1 ||
        n_token_ignored != 1) begin
      failures++;
      $display("FAIL a mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
