// dual_port_bram: the dual access block RAM shared by processor and logic.
//
// A true dual-port RAM of 2^AW words of DW bits. Port A belongs to the
// processor side, port B to the PUF wrapper. Both ports can read and write
// in every cycle. Reads are synchronous and read-first: rdata shows the word
// as it was before a write in the same cycle, one cycle after en. If both
// ports write one address in the same cycle, port B wins.
//
// The shared BRAM between the two sides is the design's; its size (default
// 2048 x 32 bits, two 36 Kb block RAMs), a single common clock and the
// collision rule are this design's choices.
module dual_port_bram #(
  parameter int unsigned AW = 11,
  parameter int unsigned DW = 32
) (
  input  logic          clk_i,
  // port A (processor)
  input  logic          a_en_i,
  input  logic          a_we_i,
  input  logic [AW-1:0] a_addr_i,
  input  logic [DW-1:0] a_wdata_i,
  output logic [DW-1:0] a_rdata_o,
  // port B (PUF wrapper)
  input  logic          b_en_i,
  input  logic          b_we_i,
  input  logic [AW-1:0] b_addr_i,
  input  logic [DW-1:0] b_wdata_i,
  output logic [DW-1:0] b_rdata_o
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk_i) begin
    if (a_en_i) a_rdata_o <= mem[a_addr_i];
    if (b_en_i) b_rdata_o <= mem[b_addr_i];
    if (a_en_i && a_we_i && !(b_en_i && b_we_i && b_addr_i == a_addr_i))
      mem[a_addr_i] <= a_wdata_i;
    if (b_en_i && b_we_i)
      mem[b_addr_i] <= b_wdata_i;
  end
endmodule
