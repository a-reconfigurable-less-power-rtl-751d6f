// ledr_encoder: output latch and LEDR encoder of a logic block.
//
// A transparent D latch holds the data bit and the phase it is to be sent in;
// two 2:1 selectors steered by the latched phase then form the rails: the V
// selector passes the value unchanged, the R selector passes the value in
// phase 0 and its complement in phase 1. The pair (V, R) therefore changes in
// exactly one wire per new word, which is what makes LEDR spacer-free.
//
// Interface: data_i / phase_i are captured while load_i is high and held while
// it is low; v_o / r_o follow the latch contents combinationally. rst_ni
// clears the latch to value 0 in phase 0 (V = R = 0).
//
// Timing: no clock. The block that drives load_i must keep data_i and phase_i
// steady until load_i has fallen again.
//
// The structure (D latch feeding two phase-steered selectors that produce V and
// R) follows the architecture's encoder drawing; the exact selector inputs,
// the phase convention and the reset are this design's choices.
//
// Lint note: the evaluate signal opens the output latch, whose new phase
// closes it again, and acknowledges loop back through the neighbours. Lint
// tools report these as combinational loops and latches; they are the
// intended self-timed handshake, not a mistake, and settle after one pass.
module ledr_encoder (
  input  logic rst_ni,
  input  logic load_i,
  input  logic data_i,
  input  logic phase_i,
  output logic v_o,
  output logic r_o
);
  logic d_q, p_q;

  // D latch, transparent while load_i is high.
  always_latch begin
    if (!rst_ni) begin
      d_q = 1'b0;
      p_q = 1'b0;
    end else if (load_i) begin
      d_q = data_i;
      p_q = phase_i;
    end
  end

  // Phase-steered selectors.
  always_comb begin
    v_o = d_q;
    r_o = p_q ? ~d_q : d_q;
  end
endmodule
