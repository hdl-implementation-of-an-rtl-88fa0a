// tb_sbf_addsub: self-checking test of the add/sub unit.
// Drives random soft values, flip requests and steps on all 64 lanes and
// compares every sum with an integer model: a flip moves the value toward the
// other sign, no flip moves it away from zero (zero counts as positive).
module tb_sbf_addsub;
  localparam int N = sbf_pkg::N_CODE;
  localparam int SOFT_W = sbf_pkg::SOFT_W;
  localparam int POW_W = sbf_pkg::POW_W;
  localparam int SUM_W = SOFT_W + POW_W;

  logic [N-1:0][SOFT_W-1:0] soft_q;
  logic [N-1:0]             flip;
  logic [N-1:0][POW_W-1:0]  power;
  logic [N-1:0][SUM_W-1:0]  sum;
  int checks = 0, failures = 0;

  sbf_addsub dut (.soft_q, .flip, .power, .sum);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int sv [N];
      int pv [N];
      for (int n = 0; n < N; n++) begin
        sv[n] = int'($urandom_range(0, 15)) - 8;
        pv[n] = int'($urandom_range(0, 7));
        soft_q[n] = SOFT_W'(sv[n]);
        power[n]  = POW_W'(pv[n]);
        flip[n]   = 1'($urandom_range(0, 1));
      end
      #1;
      for (int n = 0; n < N; n++) begin
        int dir, expv, got;
        dir = (sv[n] >= 0) ? 1 : -1;
        if (flip[n]) dir = -dir;
        expv = sv[n] + dir * pv[n];
        got = int'($signed(sum[n]));
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10)
            $display("lane %0d soft=%0d flip=%0d p=%0d: got %0d exp %0d",
                     n, sv[n], flip[n], pv[n], got, expv);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
