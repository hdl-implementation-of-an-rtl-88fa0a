// sbf_var_mux: input multiplexer in front of the variable node register.
//
// When init is 1 a new frame is loaded: each received hard bit is turned into
// a soft value, +INIT_MAG for a 0 and -INIT_MAG for a 1 (the BPSK sign
// convention). When init is 0 the saturated result of the last variable update
// passes through. Purely combinational.
//
// The document says this multiplexer is set at the start of decoding so that
// the received word goes straight into the variable node register; the mapping
// of a hard bit to a soft value is this design's choice.
module sbf_var_mux #(
  parameter int N        = sbf_pkg::N_CODE,
  parameter int SOFT_W   = sbf_pkg::SOFT_W,
  parameter int INIT_MAG = sbf_pkg::INIT_MAG
) (
  input  logic                     init,  // 1: load the received word
  input  logic [N-1:0]             yin,   // received hard decisions
  input  logic [N-1:0][SOFT_W-1:0] sat,   // saturator output
  output logic [N-1:0][SOFT_W-1:0] dout   // next variable node values
);

  always_comb begin
    for (int n = 0; n < N; n++) begin
      if (init)
        dout[n] = yin[n] ? SOFT_W'(-INIT_MAG) : SOFT_W'(INIT_MAG);
      else
        dout[n] = sat[n];
    end
  end

endmodule
