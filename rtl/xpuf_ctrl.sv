// xpuf_ctrl: the wrapper state machine between the dual access BRAM and the
// CDC-XPUF.
//
// It waits for the processor to post a job in the BRAM mailbox (cdc_pkg):
// a challenge count at MB_COUNT, the seed challenges from MB_CH_BASE, and a
// new non-zero token at MB_CMD. For every seed challenge it loads the PRNG
// (challenge_gen) and evaluates the XPUF RESP_BITS times, each time with a
// fresh set of component challenges, collecting one response bit per
// evaluation: response bit b of a challenge comes from the b-th set. The
// RESP_BITS-bit response goes back to the BRAM from MB_RSP_BASE, bit 0 in
// bit 0 of the first word. When the whole job is done the token is copied to
// MB_DONE, which the processor polls. A token equal to the last one served
// (or zero) starts nothing.
//
// One evaluation: request a new challenge set (STREAMS cycles), raise the
// trigger for EVAL_CYCLES cycles, sample the response through a two-flop
// synchroniser (the arbiter output is asynchronous) in the last of them,
// then hold the trigger low for IDLE_CYCLES cycles so that both lanes of
// every chain are low again before the challenges change. An evaluation
// therefore takes STREAMS + EVAL_CYCLES + IDLE_CYCLES + 2 clock cycles.
//
// The wrapper's role (take challenges from the processor through the
// BRAM, return responses) and the 128-bit response length are the design's;
// the mailbox protocol, the cycle counts and the state machine are this
// design's choices.
module xpuf_ctrl
  import cdc_pkg::*;
#(
  parameter int unsigned K           = 64,
  parameter int unsigned RESP_BITS   = RESP_BITS_DEFAULT,
  parameter int unsigned AW          = 11,
  parameter int unsigned DW          = 32,
  parameter int unsigned EVAL_CYCLES = 8,  // trigger high, >= 3
  parameter int unsigned IDLE_CYCLES = 8   // trigger low before the next set
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  // BRAM port B
  output logic          bram_en_o,
  output logic          bram_we_o,
  output logic [AW-1:0] bram_addr_o,
  output logic [DW-1:0] bram_wdata_o,
  input  logic [DW-1:0] bram_rdata_i,
  // challenge generator
  output logic          gen_load_o,
  output logic [K-1:0]  gen_seed_o,
  output logic          gen_next_o,
  input  logic          gen_done_i,
  // XPUF
  output logic          trig_o,
  input  logic          resp_i,       // asynchronous arbiter/XOR output
  // status
  output logic          busy_o,       // a job is being served
  output logic          eval_o        // 1-cycle pulse per sampled response bit
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CW = K / DW;          // words per challenge
  localparam int unsigned RW = RESP_BITS / DW;  // words per response
  localparam int unsigned MAX_BY_CH  = (MB_RSP_BASE - MB_CH_BASE) / CW;
  localparam int unsigned MAX_BY_RSP = (2**AW - MB_RSP_BASE) / RW;
  localparam int unsigned MAX_BATCH  = (MAX_BY_CH < MAX_BY_RSP) ? MAX_BY_CH : MAX_BY_RSP;
  localparam int unsigned CIW = $clog2(MAX_BATCH + 1);
  localparam int unsigned BIW = (RESP_BITS > 1) ? $clog2(RESP_BITS) : 1;
  localparam int unsigned WIW = (CW > RW) ? $clog2(CW + 1) : $clog2(RW + 1);
  localparam int unsigned TW  = $clog2(((EVAL_CYCLES > IDLE_CYCLES) ? EVAL_CYCLES : IDLE_CYCLES) + 1);

  if (K % DW != 0 || RESP_BITS % DW != 0 || K == 0 || RESP_BITS == 0) begin : g_chk_width
    $error("K and RESP_BITS must be non-zero multiples of DW");
  end
  if (2**AW <= MB_RSP_BASE) begin : g_chk_size
    $error("the BRAM is too small for the mailbox layout");
  end
  if (EVAL_CYCLES < 3) begin : g_chk_eval
    $error("EVAL_CYCLES must cover the two-flop synchroniser");
  end

  typedef enum logic [3:0] {
    S_POLL, S_POLL_W, S_COUNT_W, S_SEED_RD, S_SEED_W, S_LOAD,
    S_GEN, S_GEN_W, S_FIRE, S_RELAX, S_WR, S_DONE
  } state_e;

  state_e               state_q;
  logic [DW-1:0]        token_q, last_token_q;
  logic [CIW-1:0]       count_q, ch_q;
  logic [BIW-1:0]       bit_q;
  logic [WIW-1:0]       word_q;
  logic [TW-1:0]        timer_q;
  logic [K-1:0]         seed_q;
  logic [RESP_BITS-1:0] resp_q;
  logic [1:0]           sync_q;

  // Two-flop synchroniser for the asynchronous PUF response.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) sync_q <= '0;
    else         sync_q <= {sync_q[0], resp_i};
  end

  // BRAM addresses of the current challenge and response words.
  logic [AW-1:0] ch_addr, rsp_addr;
  assign ch_addr  = AW'(MB_CH_BASE  + ch_q * CW + word_q);
  assign rsp_addr = AW'(MB_RSP_BASE + ch_q * RW + word_q);

  always_comb begin
    bram_en_o    = 1'b0;
    bram_we_o    = 1'b0;
    bram_addr_o  = '0;
    bram_wdata_o = '0;
    unique case (state_q)
      S_POLL: begin
        bram_en_o   = 1'b1;
        bram_addr_o = AW'(MB_CMD);
      end
      S_POLL_W: begin
        bram_en_o   = 1'b1;
        bram_addr_o = AW'(MB_COUNT);
      end
      S_SEED_RD: begin
        bram_en_o   = 1'b1;
        bram_addr_o = ch_addr;
      end
      S_WR: begin
        bram_en_o    = 1'b1;
        bram_we_o    = 1'b1;
        bram_addr_o  = rsp_addr;
        bram_wdata_o = resp_q[word_q*DW +: DW];
      end
      S_DONE: begin
        bram_en_o    = 1'b1;
        bram_we_o    = 1'b1;
        bram_addr_o  = AW'(MB_DONE);
        bram_wdata_o = token_q;
      end
      default: ;
    endcase
  end

  assign gen_seed_o = seed_q;
  assign gen_load_o = (state_q == S_LOAD);
  assign gen_next_o = (state_q == S_GEN);
  assign busy_o     = !(state_q inside {S_POLL, S_POLL_W});

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q      <= S_POLL;
      token_q      <= '0;
      last_token_q <= '0;
      count_q      <= '0;
      ch_q         <= '0;
      bit_q        <= '0;
      word_q       <= '0;
      timer_q      <= '0;
      seed_q       <= '0;
      resp_q       <= '0;
      trig_o       <= 1'b0;
      eval_o       <= 1'b0;
    end else begin
      eval_o <= 1'b0;
      unique case (state_q)
        S_POLL: state_q <= S_POLL_W;
        S_POLL_W: begin
          // bram_rdata_i holds MB_CMD; MB_COUNT is being read.
          if (bram_rdata_i != '0 && bram_rdata_i != last_token_q) begin
            token_q <= bram_rdata_i;
            state_q <= S_COUNT_W;
          end else begin
            state_q <= S_POLL;
          end
        end
        S_COUNT_W: begin
          count_q <= (bram_rdata_i > DW'(MAX_BATCH)) ? CIW'(MAX_BATCH) : CIW'(bram_rdata_i);
          ch_q    <= '0;
          word_q  <= '0;
          state_q <= (bram_rdata_i == '0) ? S_DONE : S_SEED_RD;
        end
        S_SEED_RD: state_q <= S_SEED_W;
        S_SEED_W: begin
          seed_q[word_q*DW +: DW] <= bram_rdata_i;
          if (word_q == WIW'(CW - 1)) begin
            word_q  <= '0;
            state_q <= S_LOAD;
          end else begin
            word_q  <= word_q + 1'b1;
            state_q <= S_SEED_RD;
          end
        end
        S_LOAD: begin
          bit_q   <= '0;
          state_q <= S_GEN;
        end
        S_GEN: state_q <= S_GEN_W;
        S_GEN_W: begin
          if (gen_done_i) begin
            trig_o  <= 1'b1;
            timer_q <= TW'(EVAL_CYCLES - 1);
            state_q <= S_FIRE;
          end
        end
        S_FIRE: begin
          if (timer_q == '0) begin
            resp_q[bit_q] <= sync_q[1];
            eval_o        <= 1'b1;
            trig_o        <= 1'b0;
            timer_q       <= TW'(IDLE_CYCLES - 1);
            state_q       <= S_RELAX;
          end else begin
            timer_q <= timer_q - 1'b1;
          end
        end
        S_RELAX: begin
          if (timer_q == '0) begin
            if (bit_q == BIW'(RESP_BITS - 1)) begin
              word_q  <= '0;
              state_q <= S_WR;
            end else begin
              bit_q   <= bit_q + 1'b1;
              state_q <= S_GEN;
            end
          end else begin
            timer_q <= timer_q - 1'b1;
          end
        end
        S_WR: begin
          if (word_q == WIW'(RW - 1)) begin
            word_q <= '0;
            if (ch_q == count_q - 1'b1) begin
              state_q <= S_DONE;
            end else begin
              ch_q    <= ch_q + 1'b1;
              state_q <= S_SEED_RD;
            end
          end else begin
            word_q <= word_q + 1'b1;
          end
        end
        S_DONE: begin
          last_token_q <= token_q;
          state_q      <= S_POLL;
        end
        default: state_q <= S_POLL;
      endcase
    end
  end

  // The PUF lanes must be idle while the challenges change.
  a_trig_low_while_generating: assert property (
    @(posedge clk_i) disable iff (!rst_ni) (state_q == S_GEN_W) |-> !trig_o);
endmodule
