// tb_sbf_ctrl: self-checking test of the sequencer.
// After reset the first edge must load (var_init) without output; then check
// and variable phases alternate, a load with output comes every 2*N_IT = 8
// cycles, and nothing else is enabled.
module tb_sbf_ctrl;
  localparam int N_IT = sbf_pkg::N_IT;

  logic clk = 1'b0, rst;
  logic check_load, var_en, var_init, out_en;
  int checks = 0, failures = 0;

  sbf_ctrl dut (.clk, .rst, .check_load, .var_en, .var_init, .out_en);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sig(int cyc, logic cl, logic ve, logic vi, logic oe);
    checks++;
    if ({check_load, var_en, var_init, out_en} !== {cl, ve, vi, oe}) begin
      failures++;
      $display("cycle %0d: got cl=%0d ve=%0d vi=%0d oe=%0d exp %0d%0d%0d%0d",
               cyc, check_load, var_en, var_init, out_en, cl, ve, vi, oe);
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // cycle 0 is the one ending at the first edge after reset
    expect_sig(0, 1'b0, 1'b1, 1'b1, 1'b0);
    for (int cyc = 1; cyc < 8 * 20; cyc++) begin
      int ph;
      @(negedge clk);
      ph = (cyc - 1) % (2 * N_IT);
      expect_sig(cyc, 1'(ph % 2 == 0), 1'(ph % 2 == 1),
                 1'(ph == 2 * N_IT - 1), 1'(ph == 2 * N_IT - 1));
    end
    // reset in the middle of a frame restarts the sequence
    @(negedge clk); @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    expect_sig(999, 1'b0, 1'b1, 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
