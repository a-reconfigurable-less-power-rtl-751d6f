// lut: K-input look-up table of a logic block.
//
// The 2**K configuration bits hold the truth table; the K inputs form the
// index of the bit that is read out (input 0 is the least significant index
// bit). Purely combinational. The look-up table as the programmable function
// of the logic block follows the architecture; K = 4 is this design's choice.
module lut #(
  parameter int unsigned K = 4
) (
  input  logic [(1<<K)-1:0] cfg_i,
  input  logic [K-1:0]      in_i,
  output logic              out_o
);
  always_comb out_o = cfg_i[in_i];
endmodule
