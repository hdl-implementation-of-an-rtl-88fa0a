// tb_sbf_var_mux: self-checking test of the variable node input multiplexer.
// With init = 1 every lane must show +INIT_MAG for a received 0 and -INIT_MAG
// for a received 1; with init = 0 the saturator value must pass unchanged.
module tb_sbf_var_mux;
  localparam int N = sbf_pkg::N_CODE;
  localparam int SOFT_W = sbf_pkg::SOFT_W;
  localparam int INIT_MAG = sbf_pkg::INIT_MAG;

  logic                     init;
  logic [N-1:0]             yin;
  logic [N-1:0][SOFT_W-1:0] sat, dout;
  int checks = 0, failures = 0;

  sbf_var_mux dut (.init, .yin, .sat, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      init = 1'(t % 2);
      yin  = {$urandom, $urandom};
      for (int n = 0; n < N; n++) sat[n] = SOFT_W'($urandom);
      #1;
      for (int n = 0; n < N; n++) begin
        int expv, got;
        if (init) expv = yin[n] ? -INIT_MAG : INIT_MAG;
        else      expv = int'($signed(sat[n]));
        got = int'($signed(dout[n]));
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10) $display("t=%0d lane %0d: got %0d exp %0d", t, n, got, expv);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
