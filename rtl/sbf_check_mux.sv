// sbf_check_mux: multiplexer in front of the check node register.
//
// With load = 1 the new check parities from the VNPE are selected; with
// load = 0 the register's own output is fed back so the check nodes hold
// their values while the variable nodes are updated. Purely combinational.
//
// The feedback path is drawn in the block diagram; the use of it as a hold
// during the variable update is this design's reading.
module sbf_check_mux #(
  parameter int M = sbf_pkg::M_CODE
) (
  input  logic         load,      // 1: take the VNPE result
  input  logic [M-1:0] vnpe_syn,  // new parities
  input  logic [M-1:0] held,      // check node register output
  output logic [M-1:0] dout
);

  always_comb dout = load ? vnpe_syn : held;

endmodule
