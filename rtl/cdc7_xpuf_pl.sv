// cdc7_xpuf_pl: programmable-logic top of the CDC-7-XPUF system.
//
// The processor side reaches the logic only through port A of the dual
// access BRAM. Behind port B, the wrapper state machine (xpuf_ctrl) reads
// seed challenges, drives the PRNG challenge generator (challenge_gen) and
// the CDC-XPUF core (cdc_xpuf: STREAMS arbiter PUFs of K stages, XORed), and
// writes 128-bit responses back; see xpuf_ctrl for the mailbox protocol.
// clk_i is the 125 MHz clock that the processor side supplies.
//
// Defaults: the 64-bit CDC-7-XPUF. K = 32 gives the 32-bit variant (it then
// uses the 32-bit PRNG constants). DEVICE_SEED selects the simulated chip:
// it only changes the simulation delays of the PUF wires, not the logic.
module cdc7_xpuf_pl
  import cdc_pkg::*;
#(
  parameter int unsigned K           = 64,
  parameter int unsigned STREAMS     = STREAMS_DEFAULT,
  parameter int unsigned RESP_BITS   = RESP_BITS_DEFAULT,
  parameter int unsigned AW          = 11,
  parameter int unsigned EVAL_CYCLES = 8,
  parameter int unsigned IDLE_CYCLES = 8,
  parameter int unsigned DEVICE_SEED = 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  // processor side: BRAM port A
  input  logic          ps_en_i,
  input  logic          ps_we_i,
  input  logic [AW-1:0] ps_addr_i,
  input  logic [31:0]   ps_wdata_i,
  output logic [31:0]   ps_rdata_o,
  // status
  output logic          busy_o
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DW = 32;

  logic          b_en, b_we;
  logic [AW-1:0] b_addr;
  logic [DW-1:0] b_wdata, b_rdata;
  logic          gen_load, gen_next, gen_done, gen_busy, gen_ready;
  logic [K-1:0]  gen_seed;
  logic [STREAMS-1:0][K-1:0] chal;
  logic [STREAMS-1:0]        comp;
  logic          trig, resp, eval;

  dual_port_bram #(.AW(AW), .DW(DW)) u_bram (
    .clk_i    (clk_i),
    .a_en_i   (ps_en_i),
    .a_we_i   (ps_we_i),
    .a_addr_i (ps_addr_i),
    .a_wdata_i(ps_wdata_i),
    .a_rdata_o(ps_rdata_o),
    .b_en_i   (b_en),
    .b_we_i   (b_we),
    .b_addr_i (b_addr),
    .b_wdata_i(b_wdata),
    .b_rdata_o(b_rdata)
  );

  xpuf_ctrl #(
    .K(K), .RESP_BITS(RESP_BITS), .AW(AW), .DW(DW),
    .EVAL_CYCLES(EVAL_CYCLES), .IDLE_CYCLES(IDLE_CYCLES)
  ) u_ctrl (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .bram_en_o   (b_en),
    .bram_we_o   (b_we),
    .bram_addr_o (b_addr),
    .bram_wdata_o(b_wdata),
    .bram_rdata_i(b_rdata),
    .gen_load_o  (gen_load),
    .gen_seed_o  (gen_seed),
    .gen_next_o  (gen_next),
    .gen_done_i  (gen_done),
    .trig_o      (trig),
    .resp_i      (resp),
    .busy_o      (busy_o),
    .eval_o      (eval)
  );

  challenge_gen #(.K(K), .STREAMS(STREAMS)) u_gen (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .load_i (gen_load),
    .seed_i (gen_seed),
    .next_i (gen_next),
    .busy_o (gen_busy),
    .done_o (gen_done),
    .ready_o(gen_ready),
    .chal_o (chal)
  );

  cdc_xpuf #(.K(K), .STREAMS(STREAMS), .DEVICE_SEED(DEVICE_SEED)) u_xpuf (
    .trig_i(trig),
    .chal_i(chal),
    .comp_o(comp),
    .resp_o(resp)
  );
endmodule
