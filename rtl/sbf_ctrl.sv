// sbf_ctrl: frame and iteration sequencer of the decoder.
//
// One iteration takes two clock cycles: a check phase, in which the check node
// register takes the parities computed by the VNPE from the variable nodes,
// and a variable phase, in which the variable node register takes the soft
// values updated by CNPE, add/sub and saturator. A frame is N_IT iterations,
// 2*N_IT cycles, counted by a phase counter 0 .. 2*N_IT-1 (even = check,
// odd = variable).
//
// In the last phase of a frame the result of the final variable update is not
// written back: it goes to the output register (out_en) and the variable
// register loads the next received word instead (var_init). Loading thus
// costs no cycle of its own and a new frame starts every 2*N_IT cycles.
//
// Reset (synchronous, active high) puts the counter in the last phase, so the
// first rising edge after reset loads the first word. out_en stays low on that
// edge because no frame has been decoded yet.
//
// The two-cycle iteration follows from the document's throughput figures;
// the schedule itself is this design's own.
module sbf_ctrl #(
  parameter int N_IT = sbf_pkg::N_IT
) (
  input  logic clk,
  input  logic rst,
  output logic check_load,  // check phase: check register takes the VNPE result
  output logic var_en,      // variable phase: variable register is written
  output logic var_init,    // variable register takes the received word
  output logic out_en       // output register takes the decisions
);

  localparam int PHASES = 2 * N_IT;
  localparam int PH_W   = $clog2(PHASES);
  localparam logic [PH_W-1:0] LAST = PH_W'(PHASES - 1);

  logic [PH_W-1:0] phase;
  logic            primed;   // a frame has been loaded since reset

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= LAST;
      primed <= 1'b0;
    end else begin
      phase <= (phase == LAST) ? '0 : phase + 1'b1;
      if (phase == LAST)
        primed <= 1'b1;
    end
  end

  always_comb begin
    check_load = ~phase[0];
    var_en     = phase[0];
    var_init   = (phase == LAST);
    out_en     = var_init & primed;
  end

  // Exactly one of the two phases is active in every cycle.
  a_one_phase: assert property (@(posedge clk) disable iff (rst)
    check_load ^ var_en);
  // A new word is loaded only in a variable phase.
  a_init_in_var: assert property (@(posedge clk) disable iff (rst)
    var_init |-> var_en);

endmodule
