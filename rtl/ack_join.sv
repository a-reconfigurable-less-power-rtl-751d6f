// ack_join: Muller C-element over the enabled acknowledges of a fanout.
//
// When one wire-set drives several receivers, its driver may send the next
// word only after every receiver has acknowledged. With two-phase signalling
// that is a C-element: the output takes the common level of the enabled inputs
// once they all agree and holds its value while they differ. Disabled inputs
// are ignored; with no input enabled the output holds. rst_ni clears it.
//
// The C-element is a latch by nature, and inside the fabric its input depends
// (through the receivers) on its own output, so lint tools report a latch and
// a combinational loop here; both are the intended self-timed structure.
//
// Helper of the switch block; the architecture does not say how fanout
// acknowledges are combined, so this is this design's own choice.
module ack_join #(
  parameter int unsigned N = 8
) (
  input  logic         rst_ni,
  input  logic [N-1:0] en_i,
  input  logic [N-1:0] ack_i,
  output logic         ack_o
);
  logic all_hi, all_lo, agree, q;

  assign all_hi = &(ack_i | ~en_i);
  assign all_lo = ~|(ack_i & en_i);
  assign agree  = (|en_i) & (all_hi | all_lo);

  always_latch begin
    if (!rst_ni)    q = 1'b0;
    else if (agree) q = all_hi;
  end

  assign ack_o = q;
endmodule
