// tb_sbf_var_reg: self-checking test of the variable node register.
// Checks the reset value (+1 in every lane), that the register holds while
// en = 0 and takes the whole word in one edge while en = 1.
module tb_sbf_var_reg;
  localparam int N = sbf_pkg::N_CODE;
  localparam int SOFT_W = sbf_pkg::SOFT_W;

  logic clk = 1'b0, rst, en;
  logic [N-1:0][SOFT_W-1:0] d, q, model;
  int checks = 0, failures = 0;

  sbf_var_reg dut (.clk, .rst, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("%s: got %h exp %h", what, q, model);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; d = '0;
    @(posedge clk); @(negedge clk);
    for (int n = 0; n < N; n++) model[n] = SOFT_W'(1);
    compare("reset");
    rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      en = 1'($urandom_range(0, 1));
      d  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (en) model = d;
      @(negedge clk);
      compare(en ? "load" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
