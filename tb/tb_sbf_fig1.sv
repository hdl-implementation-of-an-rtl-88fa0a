// tb_sbf_fig1: the decoder on the 8-bit example code of the Tanner graph
// (4 check nodes, 8 variable nodes, H = sbf_pkg::H_BASE).
//
// Feeds all 256 possible 8-bit words, one frame every 8 cycles, and compares
// each decoded word with an integer model of the algorithm written for this
// small matrix. Every codeword of the example code must come out unchanged.
module tb_sbf_fig1;
  localparam int N = sbf_pkg::BASE_N;
  localparam int M = sbf_pkg::BASE_M;
  localparam int PERIOD = 2 * sbf_pkg::N_IT;
  // The example matrix, rows c1..c4 as printed, character k = v(k+1).
  localparam string ROWS [M] = '{"01011001", "11100100", "00100111", "10011010"};

  logic clk = 1'b0, rst;
  logic [N-1:0] yin, yout;
  logic [M-1:0][N-1:0] h;
  int checks = 0, failures = 0, n_codewords = 0;

  sbf #(.N(N), .M(M), .H(sbf_pkg::H_BASE)) dut (.clk, .rst, .yin, .yout);

  always #5 clk = ~clk;

  initial begin
    repeat (PERIOD * 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] syn_of(logic [N-1:0] x);
    logic [M-1:0] s;
    for (int m = 0; m < M; m++) s[m] = ^(x & h[m]);
    return s;
  endfunction

  function automatic logic [N-1:0] model(logic [N-1:0] y);
    int L [N];
    logic [N-1:0] d;
    logic [M-1:0] s;
    for (int n = 0; n < N; n++) L[n] = y[n] ? -3 : 3;
    for (int it = 0; it < sbf_pkg::N_IT; it++) begin
      for (int n = 0; n < N; n++) d[n] = (L[n] < 0);
      s = syn_of(d);
      for (int n = 0; n < N; n++) begin
        int u, sg;
        u = 0;
        for (int m = 0; m < M; m++) if (h[m][n] && s[m]) u++;
        sg = (L[n] < 0) ? -1 : 1;
        if (u >= 2)      L[n] -= 4 * sg;
        else if (u >= 1) L[n] -= 2 * sg;
        else             L[n] += 2 * sg;
        if (L[n] > 7)  L[n] = 7;
        if (L[n] < -7) L[n] = -7;
      end
    end
    for (int n = 0; n < N; n++) d[n] = (L[n] < 0);
    return d;
  endfunction

  initial begin
    for (int m = 0; m < M; m++)
      for (int n = 0; n < N; n++)
        h[m][n] = (ROWS[m][n] == "1");
    checks++;
    if (h !== sbf_pkg::H_BASE) begin failures++; $display("example matrix differs"); end

    rst = 1'b1;
    yin = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w <= 256; w++) begin
      yin = N'(w);
      @(posedge clk);
      @(negedge clk);
      if (w > 0) begin
        logic [N-1:0] prev, expv;
        prev = N'(w - 1);
        expv = model(prev);
        checks++;
        if (yout !== expv) begin
          failures++;
          $display("word %h: yout %h model %h", prev, yout, expv);
        end
        if (syn_of(prev) == '0) begin
          n_codewords++;
          checks++;
          if (yout !== prev) begin failures++; $display("codeword %h changed to %h", prev, yout); end
        end
      end
      repeat (PERIOD - 1) @(posedge clk);
    end
    $display("codewords of the example code: %0d", n_codewords);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
