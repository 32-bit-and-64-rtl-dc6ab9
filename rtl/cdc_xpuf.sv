// cdc_xpuf: component-differentially challenged XOR arbiter PUF (CDC-XPUF).
//
// STREAMS component arbiter PUFs (apuf_chain) are fired by one common
// trigger. Unlike a plain XOR PUF, every component gets its own K-bit
// challenge (chal_i[s] for stream s); the component responses are XORed
// into the single response bit. The default is the CDC-7-XPUF with 64-bit
// challenges; K = 32 gives the 32-bit variant.
//
// Timing: as apuf_chain. resp_o is asynchronous (it settles shortly after
// the slowest arbiter fires) and must be synchronised by the reader.
module cdc_xpuf
  import cdc_pkg::*;
#(
  parameter int unsigned K           = 64,
  parameter int unsigned STREAMS     = STREAMS_DEFAULT,
  parameter int unsigned DEVICE_SEED = 1
) (
  input  logic                      trig_i,
  input  logic [STREAMS-1:0][K-1:0] chal_i,  // one challenge per stream
  output logic [STREAMS-1:0]        comp_o,  // component responses
  output logic                      resp_o   // XOR of the components
);
  timeunit 1ps;
  timeprecision 1ps;

  for (genvar s = 0; s < STREAMS; s++) begin : g_stream
    apuf_chain #(
      .K(K), .DEVICE_SEED(DEVICE_SEED), .STREAM(s)
    ) u_chain (
      .trig_i(trig_i),
      .chal_i(chal_i[s]),
      .resp_o(comp_o[s])
    );
  end

  assign resp_o = ^comp_o;
endmodule
