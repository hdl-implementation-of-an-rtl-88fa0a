// sbf_perm_net: the permutation network between variable and check nodes.
//
// It is the wiring of the Tanner graph: one wire per 1 in the parity-check
// matrix H, in each direction. For every check node m it gathers the messages
// of the variable nodes joined to m, in increasing variable order, into
// v2c[m][0..DC-1]; for every variable node n it gathers the parities of the
// check nodes joined to n, in increasing check order, into c2v[n][0..DV-1].
// DC and DV are the largest row and column weights of H; a node with fewer
// edges gets 0 in its spare slots, which changes neither a parity nor a count.
// The edge lists are worked out from H at elaboration time, so the module is
// pure wiring with no gates.
//
// The document draws this network between the check and variable nodes of
// its example graph; sizing and ordering of the slots are this design's.
module sbf_perm_net #(
  parameter int N = sbf_pkg::N_CODE,
  parameter int M = sbf_pkg::M_CODE,
  parameter logic [M-1:0][N-1:0] H = sbf_pkg::H_DEFAULT,
  localparam sbf_pkg::hflat_t HF = sbf_pkg::hflat_t'(H),
  localparam int DC = sbf_pkg::max_row_weight(M, N, HF),
  localparam int DV = sbf_pkg::max_col_weight(M, N, HF)
) (
  input  logic [N-1:0]         var_msg,  // variable -> check: hard decision per variable
  input  logic [M-1:0]         chk_msg,  // check -> variable: parity per check
  output logic [M-1:0][DC-1:0] v2c,      // per check, the messages of its variables
  output logic [N-1:0][DV-1:0] c2v       // per variable, the parities of its checks
);

  initial assert (M * N <= sbf_pkg::HFLAT_W)
    else $error("sbf_perm_net: H is larger than sbf_pkg::HFLAT_W allows");

  for (genvar m = 0; m < M; m++) begin : g_check
    for (genvar k = 0; k < DC; k++) begin : g_slot
      localparam int V = sbf_pkg::var_of_check(N, HF, m, k);
      if (V >= 0) begin : g_edge
        assign v2c[m][k] = var_msg[V];
      end else begin : g_spare
        assign v2c[m][k] = 1'b0;
      end
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_var
    for (genvar k = 0; k < DV; k++) begin : g_slot
      localparam int C = sbf_pkg::check_of_var(M, N, HF, n, k);
      if (C >= 0) begin : g_edge
        assign c2v[n][k] = chk_msg[C];
      end else begin : g_spare
        assign c2v[n][k] = 1'b0;
      end
    end
  end

endmodule
