// tb_sbf_saturator: self-checking test of the saturator.
// Sweeps every possible 7-bit input on lane 0 and random inputs on the other
// lanes, and compares with min(max(x, -LMAX), LMAX).
module tb_sbf_saturator;
  localparam int N = sbf_pkg::N_CODE;
  localparam int SOFT_W = sbf_pkg::SOFT_W;
  localparam int IN_W = sbf_pkg::SOFT_W + sbf_pkg::POW_W;
  localparam int LMAX = sbf_pkg::LMAX;

  logic [N-1:0][IN_W-1:0]   din;
  logic [N-1:0][SOFT_W-1:0] dout;
  int checks = 0, failures = 0;
  int hi_hits = 0, lo_hits = 0;

  sbf_saturator dut (.din, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2**IN_W; t++) begin
      int xv [N];
      xv[0] = t - 2**(IN_W-1);
      for (int n = 1; n < N; n++) xv[n] = int'($urandom_range(0, 2**IN_W - 1)) - 2**(IN_W-1);
      for (int n = 0; n < N; n++) din[n] = IN_W'(xv[n]);
      #1;
      for (int n = 0; n < N; n++) begin
        int expv, got;
        expv = xv[n];
        if (expv > LMAX) begin expv = LMAX; hi_hits++; end
        if (expv < -LMAX) begin expv = -LMAX; lo_hits++; end
        got = int'($signed(dout[n]));
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10) $display("lane %0d in=%0d: got %0d exp %0d", n, xv[n], got, expv);
        end
      end
      #1;
    end
    checks++;
    if (hi_hits == 0 || lo_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
