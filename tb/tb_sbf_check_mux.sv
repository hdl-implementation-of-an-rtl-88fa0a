// tb_sbf_check_mux: self-checking test of the check node multiplexer.
// load = 1 must select the VNPE parities, load = 0 the held value.
module tb_sbf_check_mux;
  localparam int M = sbf_pkg::M_CODE;

  logic         load;
  logic [M-1:0] vnpe_syn, held, dout;
  int checks = 0, failures = 0;

  sbf_check_mux dut (.load, .vnpe_syn, .held, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      load = 1'($urandom_range(0, 1));
      vnpe_syn = M'($urandom);
      held = M'($urandom);
      #1;
      checks++;
      if (dout !== (load ? vnpe_syn : held)) begin
        failures++;
        $display("load=%0d syn=%h held=%h got %h", load, vnpe_syn, held, dout);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
