// config_chain: configuration memory of one cell, loaded as a shift register.
//
// Holds the memory bits that program a cell: the look-up table, the used-input
// mask and one bit per pass switch. While cfg_en_i is high each rising edge of
// cfg_clk_i shifts cfg_din_i in at bit 0 and moves every bit one place up;
// bit N-1 leaves at cfg_dout_o, which feeds the next cell of the chain. While
// cfg_en_i is low the bits hold and program the fabric. cfg_rst_ni clears all
// bits, which opens every pass switch.
//
// The architecture programs its switches and look-up tables with memory bits
// but does not say how they are written; the serial chain is this design's
// choice.
module config_chain #(
  parameter int unsigned N = 60
) (
  input  logic         cfg_clk_i,
  input  logic         cfg_rst_ni,
  input  logic         cfg_en_i,
  input  logic         cfg_din_i,
  output logic         cfg_dout_o,
  output logic [N-1:0] bits_o
);
  always_ff @(posedge cfg_clk_i or negedge cfg_rst_ni) begin
    if (!cfg_rst_ni)   bits_o <= '0;
    else if (cfg_en_i) bits_o <= {bits_o[N-2:0], cfg_din_i};
  end

  assign cfg_dout_o = bits_o[N-1];
endmodule
