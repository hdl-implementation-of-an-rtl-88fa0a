// sbf: soft bit flip LDPC decoder, top level.
//
// Decodes a 64-bit word of a rate-1/2 regular LDPC code (32 parity checks,
// see sbf_pkg for the parity-check matrix). The decoder keeps a small signed
// soft value per bit, its sign being the bit and its magnitude the trust put
// in it, and iterates two steps:
//   check phase    : the permutation network carries the signs to the check
//                    nodes, the VNPE units form each check's parity and the
//                    check node register stores it;
//   variable phase : the permutation network carries the parities back, the
//                    CNPE counts each bit's failed checks (flipping
//                    value), compares the count with two thresholds to pick a
//                    step, the add/sub unit moves the soft value by that step
//                    (toward a flip, or away from one if all checks agree),
//                    the saturator clamps it, and the variable node register
//                    stores it through the input multiplexer.
// Each iteration takes two cycles and a frame N_IT = 4 iterations, so one
// 64-bit word is decoded every 8 cycles.
//
// Interface and timing: only clock, reset, yin[63:0] and yout[63:0]. yin holds
// received hard decisions (bit n = variable node n). After reset (synchronous,
// active high) is released, yin is sampled at the 1st rising edge and then at
// every 8th edge (edges 1, 9, 17, ...). At edge 9 yout takes the decoded word
// of the frame sampled at edge 1, at edge 17 that of edge 9, and so on; yout
// holds each word for 8 cycles and is 0 until the first word is decoded. The
// decoder runs a fixed number of iterations; it does not stop early.
//
// The block structure (add/sub, saturator, multiplexers, variable and check
// node registers, VNPE, CNPE, permutation network), the 64-bit rate-1/2 size, four iterations and
// the two-cycle iteration follow the document. The parity-check matrix, the
// soft value width and initial value, the thresholds and step sizes, the
// sequencer, the output register and the frame timing are this design's own.
module sbf #(
  parameter int N        = sbf_pkg::N_CODE,
  parameter int M        = sbf_pkg::M_CODE,
  parameter logic [M-1:0][N-1:0] H = sbf_pkg::H_DEFAULT,
  parameter int N_IT     = sbf_pkg::N_IT,
  parameter int SOFT_W   = sbf_pkg::SOFT_W,
  parameter int INIT_MAG = sbf_pkg::INIT_MAG,
  parameter int LMAX     = sbf_pkg::LMAX,
  parameter int T_STRONG = sbf_pkg::T_STRONG,
  parameter int T_WEAK   = sbf_pkg::T_WEAK,
  parameter int P_STRONG = sbf_pkg::P_STRONG,
  parameter int P_WEAK   = sbf_pkg::P_WEAK,
  parameter int P_KEEP   = sbf_pkg::P_KEEP,
  parameter int POW_W    = sbf_pkg::POW_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] yin,
  output logic [N-1:0] yout
);

  localparam int SUM_W = SOFT_W + POW_W;
  localparam sbf_pkg::hflat_t HF = sbf_pkg::hflat_t'(H);
  localparam int DC    = sbf_pkg::max_row_weight(M, N, HF);
  localparam int DV    = sbf_pkg::max_col_weight(M, N, HF);
  localparam int FV_W  = $clog2(DV + 1);

  logic check_load, var_en, var_init, out_en;

  logic [N-1:0][SOFT_W-1:0] var_q, var_d, sat_out;
  logic [N-1:0][SUM_W-1:0]  sum;
  logic [M-1:0]             vnpe_syn, check_d, check_q;
  logic [N-1:0]             dec;
  logic [M-1:0][DC-1:0]     v2c;
  logic [N-1:0][DV-1:0]     c2v;
  logic [N-1:0]             flip;
  logic [N-1:0][POW_W-1:0]  power;
  logic [N-1:0][FV_W-1:0]   fval;

  sbf_ctrl #(.N_IT(N_IT)) u_ctrl (
    .clk, .rst, .check_load, .var_en, .var_init, .out_en
  );

  sbf_var_reg #(.N(N), .SOFT_W(SOFT_W)) u_var_reg (
    .clk, .rst, .en(var_en), .d(var_d), .q(var_q)
  );

  // Variable-to-check message: the sign (hard decision) of each soft value.
  always_comb
    for (int n = 0; n < N; n++)
      dec[n] = var_q[n][SOFT_W-1];

  sbf_perm_net #(.N(N), .M(M), .H(H)) u_perm (
    .var_msg(dec), .chk_msg(check_q), .v2c, .c2v
  );

  sbf_vnpe #(.M(M), .DC(DC)) u_vnpe (
    .v2c, .syn(vnpe_syn)
  );

  sbf_check_mux #(.M(M)) u_check_mux (
    .load(check_load), .vnpe_syn, .held(check_q), .dout(check_d)
  );

  sbf_check_reg #(.M(M)) u_check_reg (
    .clk, .rst, .d(check_d), .q(check_q)
  );

  sbf_cnpe #(
    .N(N), .DV(DV), .T_STRONG(T_STRONG), .T_WEAK(T_WEAK),
    .P_STRONG(P_STRONG), .P_WEAK(P_WEAK), .P_KEEP(P_KEEP), .POW_W(POW_W)
  ) u_cnpe (
    .c2v, .flip, .power, .fval
  );

  sbf_addsub #(.N(N), .SOFT_W(SOFT_W), .POW_W(POW_W)) u_addsub (
    .soft_q(var_q), .flip, .power, .sum
  );

  sbf_saturator #(.N(N), .IN_W(SUM_W), .SOFT_W(SOFT_W), .LMAX(LMAX)) u_sat (
    .din(sum), .dout(sat_out)
  );

  sbf_var_mux #(.N(N), .SOFT_W(SOFT_W), .INIT_MAG(INIT_MAG)) u_var_mux (
    .init(var_init), .yin, .sat(sat_out), .dout(var_d)
  );

  // Output register: the decisions of the last variable update of a frame.
  always_ff @(posedge clk) begin
    if (rst)
      yout <= '0;
    else if (out_en)
      for (int n = 0; n < N; n++)
        yout[n] <= sat_out[n][SOFT_W-1];
  end

endmodule
