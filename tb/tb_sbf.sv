// tb_sbf: end-to-end test of the decoder at its default size (64-bit code,
// 4 iterations).
//
// Streams frames into the decoder back to back, one every 8 cycles: clean
// codewords, codewords with 1, 2 or 3 random bit errors, and random words.
// For every frame the decoded word must match an integer model of the
// algorithm; clean and single-error frames must come out as the transmitted
// codeword. yout must change only at frame boundaries, so one 64-bit word is
// delivered every 8 cycles (2 cycles per iteration). The test also counts how
// often each mechanism of the decoder was used (strong flip, weak flip,
// reinforcement, saturation at either bound, a soft value changing sign,
// a frame load, an output write) and fails if one never happened.
module tb_sbf;
  import sbf_tb_pkg::*;

  localparam int FRAMES = 400;
  localparam int PERIOD = 2 * N_IT;

  logic clk = 1'b0, rst;
  logic [N-1:0] yin, yout;
  hmat_t h;
  int checks = 0, failures = 0;
  int cyc = 0;

  sbf dut (.clk, .rst, .yin, .yout);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (PERIOD * (FRAMES + 10)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters, sampled in every variable update ----
  int c_strong = 0, c_weak = 0, c_keep = 0, c_sat_hi = 0, c_sat_lo = 0;
  int c_sign = 0, c_load = 0, c_out = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.var_en) begin
      for (int n = 0; n < N; n++) begin
        if (dut.flip[n] && int'(dut.power[n]) == P_STRONG) c_strong++;
        if (dut.flip[n] && int'(dut.power[n]) == P_WEAK)   c_weak++;
        if (!dut.flip[n]) c_keep++;
        if (int'($signed(dut.sum[n])) > LMAX)  c_sat_hi++;
        if (int'($signed(dut.sum[n])) < -LMAX) c_sat_lo++;
        if (!dut.var_init && dut.var_d[n][3] != dut.var_q[n][3]) c_sign++;
      end
    end
    if (dut.var_init) c_load++;
    if (dut.out_en)   c_out++;
  end


  logic [N-1:0] sent [FRAMES];
  logic [N-1:0] rcvd [FRAMES];
  int           kind [FRAMES];
  int n_fixed = 0, n_tried1 = 0;
  int fixed_by_k [4] = '{0, 0, 0, 0};
  int tried_by_k [4] = '{0, 0, 0, 0};

  initial begin
    h = ref_h();
    for (int f = 0; f < FRAMES; f++) begin
      kind[f] = f % 5;  // 0 clean, 1..3 errors, 4 random word
      sent[f] = (f < 5) ? '0 : make_codeword(h);
      if (kind[f] == 4) begin
        rcvd[f] = {$urandom, $urandom};
      end else begin
        // distinct error positions
        logic [N-1:0] e;
        e = '0;
        while ($countones(e) < kind[f]) e[$urandom_range(0, N - 1)] = 1'b1;
        rcvd[f] = sent[f] ^ e;
      end
      checks++;
      if (syndrome(h, sent[f]) != '0) begin failures++; $display("frame %0d: not a codeword", f); end
    end

    rst = 1'b1;
    yin = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (yout !== '0) begin failures++; $display("yout not cleared by reset"); end

    for (int f = 0; f <= FRAMES; f++) begin
      logic [N-1:0] held_out;
      yin = (f < FRAMES) ? rcvd[f] : '0;
      @(posedge clk);                 // load edge of frame f, output of f-1
      @(negedge clk);
      if (f > 0) begin
        logic [N-1:0] expv;
        expv = ref_decode(h, rcvd[f-1]);
        checks++;
        if (yout !== expv) begin
          failures++;
          if (failures < 10) $display("frame %0d: yout %h model %h", f - 1, yout, expv);
        end
        if (kind[f-1] <= 1) begin
          checks++;
          if (yout !== sent[f-1]) begin
            failures++;
            if (failures < 10) $display("frame %0d (%0d errors) not corrected", f - 1, kind[f-1]);
          end
        end
        if (kind[f-1] <= 3) begin
          tried_by_k[kind[f-1]]++;
          if (yout === sent[f-1]) fixed_by_k[kind[f-1]]++;
        end
        if (kind[f-1] >= 1 && kind[f-1] <= 3) begin
          n_tried1++;
          if (yout === sent[f-1]) n_fixed++;
        end
      end
      yin = {$urandom, $urandom};     // must be ignored between loads
      held_out = yout;
      for (int k = 1; k < PERIOD; k++) begin
        @(negedge clk);
        checks++;
        if (yout !== held_out) begin failures++; $display("frame %0d: yout changed mid-frame", f); end
      end
    end

    $display("mechanisms: strong=%0d weak=%0d keep=%0d sat_hi=%0d sat_lo=%0d sign_change=%0d load=%0d out=%0d",
             c_strong, c_weak, c_keep, c_sat_hi, c_sat_lo, c_sign, c_load, c_out);
    $display("frames with 1-3 errors decoded to the sent codeword: %0d of %0d", n_fixed, n_tried1);
    for (int k = 0; k < 4; k++)
      $display("  %0d errors: %0d of %0d corrected", k, fixed_by_k[k], tried_by_k[k]);
    checks++; if (c_strong == 0) begin failures++; $display("no strong flip"); end
    checks++; if (c_weak == 0)   begin failures++; $display("no weak flip"); end
    checks++; if (c_keep == 0)   begin failures++; $display("no reinforcement"); end
    checks++; if (c_sat_hi == 0) begin failures++; $display("no saturation high"); end
    checks++; if (c_sat_lo == 0) begin failures++; $display("no saturation low"); end
    checks++; if (c_sign == 0)   begin failures++; $display("no sign change"); end
    checks++; if (c_load != FRAMES + 1) begin failures++; $display("loads %0d", c_load); end
    checks++; if (c_out != FRAMES) begin failures++; $display("outputs %0d", c_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
