// sbf_vnpe: variable node processing elements.
//
// One unit per check node. Each takes, through the permutation network, the
// hard decisions (sign bits of the soft values) of the DC variable nodes
// joined to its check and forms their parity:
//   syn[m] = v2c[m][0] ^ v2c[m][1] ^ ... ^ v2c[m][DC-1]
// syn[m] = 1 marks an unsatisfied check. This is the variable-to-check half
// of an iteration; the result is written into the check node register.
// Purely combinational, all M checks at once.
//
// The document has the VNPE units update the check nodes from the variable
// nodes; sending only the sign of each soft value is this design's choice.
module sbf_vnpe #(
  parameter int M  = sbf_pkg::M_CODE,
  parameter int DC = sbf_pkg::DC_DEFAULT
) (
  input  logic [M-1:0][DC-1:0] v2c,  // variable messages, per check
  output logic [M-1:0]         syn   // 1: check m unsatisfied
);

  always_comb begin
    for (int m = 0; m < M; m++)
      syn[m] = ^v2c[m];
  end

endmodule
