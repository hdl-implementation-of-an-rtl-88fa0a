// tb_sbf_check_reg: self-checking test of the check node register.
// Checks the cleared reset value and that each edge takes d.
module tb_sbf_check_reg;
  localparam int M = sbf_pkg::M_CODE;

  logic clk = 1'b0, rst;
  logic [M-1:0] d, q, model;
  int checks = 0, failures = 0;

  sbf_check_reg dut (.clk, .rst, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; d = '1;
    @(posedge clk); @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("reset: got %h", q); end
    rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      d = M'($urandom);
      model = d;
      @(posedge clk); @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("got %h exp %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
