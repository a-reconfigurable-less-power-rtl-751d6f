// fpga_cell: one tile of the fabric, a logic block beside its switch block.
//
// The cell holds a logic block (LUT, LEDR phase detection and encoder, sleep
// controller), the switch block that links it to the four neighbouring cells,
// and the configuration memory of both. The logic block output is a source of
// the switch block and its K inputs are destinations of it; the four sides of
// the switch block are the cell's ports.
//
// Configuration bit layout (bit 0 is the last one shifted in):
//   [0      +: 2**K]        look-up table, entry i selects output for index i
//   [2**K   +: K]           used-input mask of the logic block
//   [2**K+K +: NDST*NSRC]   pass-switch bits, bit d*NSRC+s connects source s
//                           to destination d (see switch_block)
//
// Interface: side_* as in switch_block; cfg_* is the serial configuration
// chain (cfg_en_i high while shifting; the fabric should be held in reset or
// idle meanwhile); tick_i is the power-gating timebase; pg_en_o / mode_o
// report the block's power switch and power mode.
//
// The cell as logic block plus switch block follows the architecture drawing;
// the bit layout is this design's choice.
//
// Lint note: the evaluate signal opens the output latch, whose new phase
// closes it again, and acknowledges loop back through the neighbours. Lint
// tools report these as combinational loops and latches; they are the
// intended self-timed handshake, not a mistake, and settle after one pass.
module fpga_cell
  import fpga_pkg::*;
#(
  parameter int unsigned K          = 4,
  parameter int unsigned IDLE_TICKS = 8,
  parameter int unsigned WAKE_TICKS = 2,
  localparam int unsigned NSRC      = NSIDES + 1,
  localparam int unsigned NDST      = NSIDES + K,
  localparam int unsigned CFG_BITS  = (1 << K) + K + NDST * NSRC
) (
  input  logic              rst_ni,
  input  logic              tick_i,
  input  logic              cfg_clk_i,
  input  logic              cfg_en_i,
  input  logic              cfg_din_i,
  output logic              cfg_dout_o,
  input  fwd_t [NSIDES-1:0] side_in_i,
  output logic [NSIDES-1:0] side_in_ack_o,
  output fwd_t [NSIDES-1:0] side_out_o,
  input  logic [NSIDES-1:0] side_out_ack_i,
  output logic              pg_en_o,
  output pg_mode_e          mode_o
);
  logic [CFG_BITS-1:0]       cfg;
  logic [(1<<K)-1:0]         cfg_lut;
  logic [K-1:0]              cfg_used;
  logic [NDST-1:0][NSRC-1:0] cfg_sw;

  fwd_t         lb_out;
  logic         lb_out_ack;
  fwd_t [K-1:0] lb_in;
  logic         lb_in_ack;

  config_chain #(.N(CFG_BITS)) u_cfg (
    .cfg_clk_i  (cfg_clk_i),
    .cfg_rst_ni (rst_ni),
    .cfg_en_i   (cfg_en_i),
    .cfg_din_i  (cfg_din_i),
    .cfg_dout_o (cfg_dout_o),
    .bits_o     (cfg)
  );

  assign cfg_lut  = cfg[0 +: (1<<K)];
  assign cfg_used = cfg[(1<<K) +: K];
  assign cfg_sw   = cfg[(1<<K)+K +: NDST*NSRC];

  logic_block #(.K(K), .IDLE_TICKS(IDLE_TICKS), .WAKE_TICKS(WAKE_TICKS)) u_lb (
    .rst_ni     (rst_ni),
    .tick_i     (tick_i),
    .cfg_lut_i  (cfg_lut),
    .cfg_used_i (cfg_used),
    .in_i       (lb_in),
    .in_ack_o   (lb_in_ack),
    .out_o      (lb_out),
    .out_ack_i  (lb_out_ack),
    .pg_en_o    (pg_en_o),
    .mode_o     (mode_o)
  );

  switch_block #(.K(K)) u_sb (
    .rst_ni         (rst_ni),
    .cfg_i          (cfg_sw),
    .side_in_i      (side_in_i),
    .side_in_ack_o  (side_in_ack_o),
    .side_out_o     (side_out_o),
    .side_out_ack_i (side_out_ack_i),
    .lb_out_i       (lb_out),
    .lb_out_ack_o   (lb_out_ack),
    .lb_in_o        (lb_in),
    .lb_in_ack_i    ({K{lb_in_ack}})
  );

  // Each wired destination node may have at most one driver.
  always_ff @(posedge tick_i) begin
    if (!cfg_en_i) begin
      for (int d = 0; d < NDST; d++) begin
        assert ($onehot0(cfg_sw[d]))
          else $error("fpga_cell: destination %0d has more than one source", d);
      end
    end
  end
endmodule
