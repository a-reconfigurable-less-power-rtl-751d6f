// switch_block: programmable crossing of the routing channels at one cell.
//
// Sources are the four incoming wire-sets (W, N, E, S) and the output of the
// cell's logic block; destinations are the four outgoing wire-sets and the K
// inputs of the logic block. Every (destination, source) pair has a pass
// switch with one configuration bit. A destination receives the OR of its
// enabled pass switches, so at most one source per destination may be enabled.
// The acknowledges travel back through the same pass switches; a source that
// drives several destinations gets the C-element join of their acknowledges
// (ack_join), so it waits for all receivers.
//
// Interface: side_in_i / side_in_ack_o are the incoming wire-sets and their
// acknowledges, side_out_o / side_out_ack_i the outgoing ones, indexed by
// SIDE_W..SIDE_S. lb_out_i / lb_out_ack_o connect the logic block output,
// lb_in_o / lb_in_ack_i its inputs. cfg_i[d][s] enables source s onto
// destination d, destinations 0..3 being the sides and 4..4+K-1 the logic
// block inputs, sources 0..3 the sides and 4 the logic block.
//
// One wire-set per channel side (V, R, ACK, data-arrival) and pass switches
// with a memory bit follow the architecture; the directional model and the
// full source-to-destination pattern are this design's choices.
//
// Lint note: the evaluate signal opens the output latch, whose new phase
// closes it again, and acknowledges loop back through the neighbours. Lint
// tools report these as combinational loops and latches; they are the
// intended self-timed handshake, not a mistake, and settle after one pass.
module switch_block
  import fpga_pkg::*;
#(
  parameter int unsigned K    = 4,
  localparam int unsigned NSRC = NSIDES + 1,  // sides + logic block output
  localparam int unsigned NDST = NSIDES + K   // sides + logic block inputs
) (
  input  logic                      rst_ni,
  input  logic [NDST-1:0][NSRC-1:0] cfg_i,
  input  fwd_t [NSIDES-1:0]         side_in_i,
  output logic [NSIDES-1:0]         side_in_ack_o,
  output fwd_t [NSIDES-1:0]         side_out_o,
  input  logic [NSIDES-1:0]         side_out_ack_i,
  input  fwd_t                      lb_out_i,
  output logic                      lb_out_ack_o,
  output fwd_t [K-1:0]              lb_in_o,
  input  logic [K-1:0]              lb_in_ack_i
);
  fwd_t [NSRC-1:0]            src_fwd;
  logic [NDST-1:0]            dst_ack;
  fwd_t [NDST-1:0][NSRC-1:0]  sw_fwd;
  logic [NSRC-1:0][NDST-1:0]  sw_ack;   // transposed: per source
  logic [NSRC-1:0][NDST-1:0]  src_en;
  fwd_t [NDST-1:0]            dst_fwd;
  logic [NSRC-1:0]            src_ack;

  assign src_fwd = {lb_out_i, side_in_i};
  assign dst_ack = {lb_in_ack_i, side_out_ack_i};

  for (genvar d = 0; d < NDST; d++) begin : g_dst
    for (genvar s = 0; s < NSRC; s++) begin : g_src
      pass_switch u_sw (
        .en_i    (cfg_i[d][s]),
        .a_fwd_i (src_fwd[s]),
        .a_ack_o (sw_ack[s][d]),
        .b_fwd_o (sw_fwd[d][s]),
        .b_ack_i (dst_ack[d])
      );
      assign src_en[s][d] = cfg_i[d][s];
    end
  end

  // Wired node of each destination.
  always_comb begin
    for (int d = 0; d < NDST; d++) begin
      dst_fwd[d] = '0;
      for (int s = 0; s < NSRC; s++) dst_fwd[d] = dst_fwd[d] | sw_fwd[d][s];
    end
  end

  for (genvar s = 0; s < NSRC; s++) begin : g_join
    ack_join #(.N(NDST)) u_join (
      .rst_ni (rst_ni),
      .en_i   (src_en[s]),
      .ack_i  (sw_ack[s]),
      .ack_o  (src_ack[s])
    );
  end

  always_comb begin
    side_out_o    = dst_fwd[NSIDES-1:0];
    lb_in_o       = dst_fwd[NDST-1:NSIDES];
    side_in_ack_o = src_ack[NSIDES-1:0];
    lb_out_ack_o  = src_ack[NSIDES];
  end
endmodule
