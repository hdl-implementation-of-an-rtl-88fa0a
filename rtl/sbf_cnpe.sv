// sbf_cnpe: check node processing element.
//
// For every variable node n it takes, through the permutation network, the
// parities of the DV check nodes joined to n and counts the unsatisfied ones. That count is the flipping value
// fval[n]. It is compared with two thresholds to choose the flipping power:
//   fval >= T_STRONG : flip, step P_STRONG
//   fval >= T_WEAK   : flip, step P_WEAK
//   otherwise        : no flip, step P_KEEP (reinforce the current decision)
// A check's message to n proper would be the XOR of its other variables,
// leaving n's own contribution out; that message contradicts n's decision
// exactly when the check's full parity is 1, so counting failed parities is
// the same as counting contradicting check messages.
// The add/sub unit then applies the step to the node's soft value. A node
// with a high reliability therefore survives a single weak flip request,
// while a node all of whose checks fail flips at once.
// fval is just wide enough for DV (2 bits for the default code). Purely combinational; all N variable nodes at once.
//
// The document says the CNPE computes a flipping value and compares it with
// threshold values to find the flipping power; the count of unsatisfied
// checks as flipping value, the two thresholds and the step sizes are this
// design's choices.
module sbf_cnpe #(
  parameter int N        = sbf_pkg::N_CODE,
  parameter int DV       = sbf_pkg::DV_DEFAULT,
  parameter int T_STRONG = sbf_pkg::T_STRONG,
  parameter int T_WEAK   = sbf_pkg::T_WEAK,
  parameter int P_STRONG = sbf_pkg::P_STRONG,
  parameter int P_WEAK   = sbf_pkg::P_WEAK,
  parameter int P_KEEP   = sbf_pkg::P_KEEP,
  parameter int POW_W    = sbf_pkg::POW_W,
  localparam int FV_W    = $clog2(DV + 1)
) (
  input  logic [N-1:0][DV-1:0]    c2v,    // check parities per variable, 1: unsatisfied
  output logic [N-1:0]            flip,   // 1: move toward the other sign
  output logic [N-1:0][POW_W-1:0] power,  // step size
  output logic [N-1:0][FV_W-1:0]  fval    // flipping value per node
);

  always_comb begin
    for (int n = 0; n < N; n++) begin
      fval[n] = '0;
      for (int k = 0; k < DV; k++)
        fval[n] = fval[n] + FV_W'(c2v[n][k]);
      if (int'(fval[n]) >= T_STRONG) begin
        flip[n]  = 1'b1;
        power[n] = POW_W'(P_STRONG);
      end else if (int'(fval[n]) >= T_WEAK) begin
        flip[n]  = 1'b1;
        power[n] = POW_W'(P_WEAK);
      end else begin
        flip[n]  = 1'b0;
        power[n] = POW_W'(P_KEEP);
      end
    end
  end

endmodule
