// tb_sbf_cnpe: self-checking test of the check node processing element.
// For random check parities on every variable's slots it recounts the
// unsatisfied checks and compares the flipping value, the flip request and
// the step with the threshold rule.
// Each of the three outcomes (strong flip, weak flip, keep) must occur.
module tb_sbf_cnpe;
  import sbf_tb_pkg::*;
  localparam int POW_W = sbf_pkg::POW_W;
  localparam int DV = sbf_pkg::DV_DEFAULT;
  localparam int FV_W = $clog2(DV + 1);

  logic [N-1:0][DV-1:0]    c2v;
  logic [N-1:0]            flip;
  logic [N-1:0][POW_W-1:0] power;
  logic [N-1:0][FV_W-1:0]  fval;
  int checks = 0, failures = 0;
  int n_strong = 0, n_weak = 0, n_keep = 0;

  sbf_cnpe dut (.c2v, .flip, .power, .fval);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (DV != 2 || FV_W != 2) begin failures++; $display("DV %0d FV_W %0d", DV, FV_W); end
    for (int t = 0; t < 300; t++) begin
      for (int n = 0; n < N; n++)
        c2v[n] = (t < 2) ? (t == 0 ? '0 : '1) : DV'($urandom);
      #1;
      for (int n = 0; n < N; n++) begin
        int u, ef, ep;
        u = 0;
        for (int k = 0; k < DV; k++) if (c2v[n][k]) u++;
        if (u >= T_STRONG)    begin ef = 1; ep = P_STRONG; n_strong++; end
        else if (u >= T_WEAK) begin ef = 1; ep = P_WEAK;   n_weak++;   end
        else                  begin ef = 0; ep = P_KEEP;   n_keep++;   end
        checks++;
        if (int'(fval[n]) != u || int'(flip[n]) != ef || int'(power[n]) != ep) begin
          failures++;
          if (failures < 10)
            $display("node %0d: fval %0d/%0d flip %0d/%0d power %0d/%0d",
                     n, fval[n], u, flip[n], ef, power[n], ep);
        end
      end
      #1;
    end
    checks++;
    if (n_strong == 0 || n_weak == 0 || n_keep == 0) failures++;
    $display("strong=%0d weak=%0d keep=%0d", n_strong, n_weak, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
