// tb_sbf_perm_net: self-checking test of the permutation network.
// Checks that the RTL's parity-check matrix equals one built independently,
// then, for random variable and check messages, that every check receives
// the messages of exactly its variables (in increasing order) and every
// variable the parities of exactly its checks. Parities of the routed
// decisions of a codeword must all be 0.
module tb_sbf_perm_net;
  import sbf_tb_pkg::*;
  localparam int DC = 4, DV = 2;

  logic [N-1:0]         var_msg;
  logic [M-1:0]         chk_msg;
  logic [M-1:0][DC-1:0] v2c;
  logic [N-1:0][DV-1:0] c2v;
  hmat_t h;
  int checks = 0, failures = 0;

  sbf_perm_net dut (.var_msg, .chk_msg, .v2c, .c2v);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int m = 0; m < M; m++) begin
      int k;
      k = 0;
      for (int n = 0; n < N; n++)
        if (h[m][n]) begin
          checks++;
          if (v2c[m][k] !== var_msg[n]) begin
            failures++;
            if (failures < 10) $display("check %0d slot %0d: got %0d, v%0d is %0d", m, k, v2c[m][k], n, var_msg[n]);
          end
          k++;
        end
    end
    for (int n = 0; n < N; n++) begin
      int k;
      k = 0;
      for (int m = 0; m < M; m++)
        if (h[m][n]) begin
          checks++;
          if (c2v[n][k] !== chk_msg[m]) begin
            failures++;
            if (failures < 10) $display("var %0d slot %0d: got %0d, c%0d is %0d", n, k, c2v[n][k], m, chk_msg[m]);
          end
          k++;
        end
    end
  endtask

  initial begin
    h = ref_h();
    checks++;
    if (sbf_pkg::H_DEFAULT !== h) begin failures++; $display("H differs"); end
    for (int t = 0; t < 200; t++) begin
      var_msg = {$urandom, $urandom};
      chk_msg = M'($urandom);
      #1;
      compare();
      #1;
    end
    for (int t = 0; t < 20; t++) begin
      var_msg = make_codeword(h);
      chk_msg = '0;
      #1;
      for (int m = 0; m < M; m++) begin
        checks++;
        if (^v2c[m] !== 1'b0) begin failures++; $display("codeword check %0d not satisfied", m); end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
