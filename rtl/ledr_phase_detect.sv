// ledr_phase_detect: completion detection for the LEDR inputs of a logic block.
//
// Compares the phase of every used input word with the phase of the block's own
// output word. An input whose phase differs from the output phase carries a new
// word that has not been consumed yet. The block may evaluate when every used
// input carries a new word (all_arrived_o); any_arrived_o reports that at least
// one has started to arrive, which the sleep controller takes as activity.
// in_phase_o is the phase of the arriving inputs, taken from the lowest-index
// used input so that it does not depend on the output phase it is compared with.
//
// Interface: K LEDR inputs (v/r pairs), a mask of used inputs, and the current
// output phase. Purely combinational; unused inputs are ignored and a block
// with no used input never reports arrival.
module ledr_phase_detect #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] in_v_i,
  input  logic [K-1:0] in_r_i,
  input  logic [K-1:0] used_i,
  input  logic         out_phase_i,
  output logic         all_arrived_o,
  output logic         any_arrived_o,
  output logic         in_phase_o
);
  logic [K-1:0] phase, fresh;

  always_comb begin
    phase         = in_v_i ^ in_r_i;
    fresh         = (phase ^ {K{out_phase_i}}) & used_i;
    any_arrived_o = |fresh;
    all_arrived_o = (fresh == used_i) && (used_i != '0);
    in_phase_o    = 1'b0;
    for (int i = K - 1; i >= 0; i--) begin
      if (used_i[i]) in_phase_o = phase[i];
    end
  end
endmodule
