// sbf_check_reg: the check node register.
//
// Stores the parity (1 = unsatisfied) of all M check nodes between the check
// update and the variable update. It takes d on every rising clock edge; the
// check multiplexer in front of it decides whether that is a new value or the
// old one. A synchronous active-high reset clears it.
//
// The document calls this a shift register; as for the variable node
// register, the whole word is taken in one cycle here so that an iteration
// takes two cycles, as the document's throughput figures require.
module sbf_check_reg #(
  parameter int M = sbf_pkg::M_CODE
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [M-1:0] d,
  output logic [M-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)
      q <= '0;
    else
      q <= d;
  end

endmodule
