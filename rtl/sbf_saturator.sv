// sbf_saturator: clamps the add/sub results to the soft-value range.
//
// Each lane takes a signed IN_W-bit sum and limits it to [-LMAX, +LMAX],
// then drops the unused high bits to give a signed SOFT_W-bit soft value.
// A symmetric range keeps the decision (sign) unbiased. Because received bits
// start at an odd magnitude and every step is even, soft values stay odd, so
// with an odd LMAX they never reach zero. Purely combinational.
//
// The document names a saturator after the add/sub unit; the range is this
// design's choice.
module sbf_saturator #(
  parameter int N      = sbf_pkg::N_CODE,
  parameter int IN_W   = sbf_pkg::SOFT_W + sbf_pkg::POW_W,
  parameter int SOFT_W = sbf_pkg::SOFT_W,
  parameter int LMAX   = sbf_pkg::LMAX
) (
  input  logic [N-1:0][IN_W-1:0]   din,   // signed sums
  output logic [N-1:0][SOFT_W-1:0] dout   // signed, |dout| <= LMAX
);

  localparam logic signed [IN_W-1:0] HI = IN_W'(LMAX);
  localparam logic signed [IN_W-1:0] LO = -IN_W'(LMAX);

  initial assert (LMAX < 2**(SOFT_W-1) && IN_W >= SOFT_W)
    else $error("sbf_saturator: LMAX does not fit in SOFT_W bits");

  always_comb begin
    for (int n = 0; n < N; n++) begin
      if ($signed(din[n]) > HI)
        dout[n] = SOFT_W'(LMAX);
      else if ($signed(din[n]) < LO)
        dout[n] = SOFT_W'(-LMAX);
      else
        dout[n] = din[n][SOFT_W-1:0];
    end
  end

endmodule
