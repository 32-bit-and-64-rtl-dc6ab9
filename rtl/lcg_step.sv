// lcg_step: one step of the challenge PRNG, C(n+1) = (A * C(n) + G) mod 2^K.
//
// The modulus 2^K is free: the product and the sum are simply truncated to
// K bits, so the block is one K x K multiplier (low half only) and one adder.
// The generator form is the design's; the default constants are this
// design's choice (see cdc_pkg).
//
// Timing: combinational.
module lcg_step
  import cdc_pkg::*;
#(
  parameter int unsigned K = 64,
  parameter logic [K-1:0] A = K'(lcg_a(K)),
  parameter logic [K-1:0] G = K'(lcg_g(K))
) (
  input  logic [K-1:0] c_i,
  output logic [K-1:0] c_o
);
  timeunit 1ps;
  timeprecision 1ps;

  assign c_o = K'(A * c_i + G);
endmodule
