// pass_switch: one programmable connection between two wire-set ends.
//
// Four pass switches, one per wire of the wire-set (V, R, acknowledge and
// wake-up), all controlled by the same configuration memory bit. When the bit
// is 1 the forward wires of end A appear at end B and the acknowledge of end B
// appears at end A; when it is 0 both outputs are 0, so the switch block can
// merge the outputs of several pass switches with an OR, as the shared wire of
// a real pass-transistor node would.
//
// The pass transistors of the architecture are bidirectional. This model is
// directional (A is the driver, B the receiver), which is how a switch block
// of this design gives each connection a fixed direction; that is this
// design's choice. Purely combinational; inside the fabric its paths are part
// of the self-timed handshake loops, which lint tools report as
// combinational loops.
module pass_switch
  import fpga_pkg::*;
(
  input  logic en_i,    // configuration memory bit
  input  fwd_t a_fwd_i,
  output logic a_ack_o,
  output fwd_t b_fwd_o,
  input  logic b_ack_i
);
  always_comb begin
    b_fwd_o = en_i ? a_fwd_i : '0;
    a_ack_o = en_i & b_ack_i;
  end
endmodule
