// sbf_var_reg: the variable node register.
//
// Holds the signed soft value of every variable node. On a rising clock edge
// with en = 1 all N values are replaced by d at once; otherwise they hold.
// A synchronous active-high reset sets every value to +1 (bit 0, lowest
// reliability).
//
// The document calls this a shift register filled bit by bit. Its throughput
// figures (two cycles per iteration) only work out if a whole word is taken
// per cycle, so this register loads all lanes in parallel. The reset value is
// this design's choice.
module sbf_var_reg #(
  parameter int N      = sbf_pkg::N_CODE,
  parameter int SOFT_W = sbf_pkg::SOFT_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic [N-1:0][SOFT_W-1:0] d,
  output logic [N-1:0][SOFT_W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)
      q <= {N{SOFT_W'(1)}};
    else if (en)
      q <= d;
  end

endmodule
