// tb_sbf_vnpe: self-checking test of the VNPE units.
// Drives random variable messages into every check slot and compares each
// check parity with a parity counted bit by bit.
module tb_sbf_vnpe;
  localparam int M = sbf_pkg::M_CODE;
  localparam int DC = sbf_pkg::DC_DEFAULT;

  logic [M-1:0][DC-1:0] v2c;
  logic [M-1:0]         syn;
  int checks = 0, failures = 0;

  sbf_vnpe dut (.v2c, .syn);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (DC != 4) begin failures++; $display("check degree %0d, expected 4", DC); end
    for (int t = 0; t < 300; t++) begin
      for (int m = 0; m < M; m++) v2c[m] = DC'($urandom);
      #1;
      for (int m = 0; m < M; m++) begin
        int ones;
        ones = 0;
        for (int k = 0; k < DC; k++) if (v2c[m][k]) ones++;
        checks++;
        if (syn[m] !== 1'(ones % 2)) begin
          failures++;
          if (failures < 10) $display("check %0d msgs %b: got %0d", m, v2c[m], syn[m]);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
