// sbf_addsub: the add/sub unit of the soft bit flip decoder.
//
// Every variable node keeps a signed soft value whose sign is its hard
// decision (negative = bit 1) and whose magnitude is its reliability. In each
// variable update the check node processing element (CNPE) hands this unit, per
// node, a flip request and a step size ("flipping power"). The unit moves the
// soft value by that step: toward the opposite sign when a flip is requested,
// away from zero when it is not. So it subtracts for a non-negative value that
// must flip or a negative value that is reinforced, and adds otherwise.
//
// The result is SOFT_W+POW_W bits wide, wide enough that no sum overflows;
// the saturator that follows brings it back into the soft-value range.
// Purely combinational, N lanes side by side.
//
// The document names this unit and places it between the CNPE and the
// saturator; the add/subtract rule above is this design's reading of it.
module sbf_addsub #(
  parameter int N      = sbf_pkg::N_CODE,
  parameter int SOFT_W = sbf_pkg::SOFT_W,
  parameter int POW_W  = sbf_pkg::POW_W,
  localparam int SUM_W = SOFT_W + POW_W
) (
  input  logic [N-1:0][SOFT_W-1:0] soft_q,  // current soft values
  input  logic [N-1:0]             flip,    // 1: move toward the other sign
  input  logic [N-1:0][POW_W-1:0]  power,   // step size, unsigned
  output logic [N-1:0][SUM_W-1:0]  sum      // soft_q +/- power, not saturated
);

  always_comb begin
    for (int n = 0; n < N; n++) begin
      logic signed [SUM_W-1:0] a, b;
      a = SUM_W'($signed(soft_q[n]));
      b = $signed({{SOFT_W{1'b0}}, power[n]});
      // A flip of a non-negative value or a reinforcement of a negative one
      // both lower the value.
      if (flip[n] ^ soft_q[n][SOFT_W-1])
        sum[n] = a - b;
      else
        sum[n] = a + b;
    end
  end

endmodule
