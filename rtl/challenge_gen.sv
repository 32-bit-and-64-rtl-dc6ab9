// challenge_gen: makes the component-differential challenges of the XPUF.
//
// One seed challenge C(0) comes from the processor. The generator iterates
// C(n+1) = (a * C(n) + g) mod 2^K (lcg_step) and hands successive values to
// the streams: the first request fills stream 0..STREAMS-1 with
// C(1)..C(STREAMS), the next request with C(STREAMS+1)..C(2*STREAMS), and so
// on, so that every evaluation of the XPUF uses fresh and, between streams,
// different challenges. Using Eq. (1) for this is the design's; feeding the
// streams in order from one sequential generator (one multiplier instead of
// one per stream) is this design's choice.
//
// Interface / timing:
//   load_i   (1 cycle)  : take seed_i as C(0); clears ready_o.
//   next_i   (1 cycle)  : start a new set; ignored while busy_o.
//   busy_o              : high during the STREAMS cycles of generation, in
//                         which chal_o changes one stream per cycle.
//   done_o   (1 cycle)  : the new set is complete in chal_o, exactly STREAMS
//                         cycles after next_i.
//   ready_o             : a complete set is held in chal_o.
module challenge_gen
  import cdc_pkg::*;
#(
  parameter int unsigned  K       = 64,
  parameter int unsigned  STREAMS = STREAMS_DEFAULT,
  parameter logic [K-1:0] A       = K'(lcg_a(K)),
  parameter logic [K-1:0] G       = K'(lcg_g(K))
) (
  input  logic                      clk_i,
  input  logic                      rst_ni,
  input  logic                      load_i,
  input  logic [K-1:0]              seed_i,
  input  logic                      next_i,
  output logic                      busy_o,
  output logic                      done_o,
  output logic                      ready_o,
  output logic [STREAMS-1:0][K-1:0] chal_o
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned SW = (STREAMS > 1) ? $clog2(STREAMS) : 1;

  logic [K-1:0]  state_q, state_next;
  logic [SW-1:0] idx_q;

  lcg_step #(.K(K), .A(A), .G(G)) u_lcg (.c_i(state_q), .c_o(state_next));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= '0;
      idx_q   <= '0;
      busy_o  <= 1'b0;
      done_o  <= 1'b0;
      ready_o <= 1'b0;
      chal_o  <= '0;
    end else begin
      done_o <= 1'b0;
      if (load_i) begin
        state_q <= seed_i;
        busy_o  <= 1'b0;
        ready_o <= 1'b0;
      end else if (busy_o) begin
        state_q       <= state_next;
        chal_o[idx_q] <= state_next;
        if (idx_q == SW'(STREAMS - 1)) begin
          idx_q   <= '0;
          busy_o  <= 1'b0;
          done_o  <= 1'b1;
          ready_o <= 1'b1;
        end else begin
          idx_q <= idx_q + 1'b1;
        end
      end else if (next_i) begin
        busy_o  <= 1'b1;
        ready_o <= 1'b0;
        idx_q   <= '0;
      end
    end
  end
endmodule
