// async_fpga: clockless, power-gated FPGA fabric with LEDR routing.
//
// ROWS x COLS cells, each a logic block with its switch block, joined by
// wire-sets of four wires: the LEDR rails V and R, an acknowledge running
// back, and a data-arrival (wake-up) wire running ahead of the data. The east
// side of cell (r,c) meets the west side of cell (r,c+1); the south side of
// cell (r,c) meets the north side of cell (r+1,c). The sides on the border of
// the array are the fabric's I/O: for every border side there is an incoming
// wire-set with its acknowledge out, and an outgoing wire-set with its
// acknowledge in. The configuration chains of the cells are joined in the
// order cell (0,0), (0,1), ..., (ROWS-1,COLS-1) between cfg_din_i and
// cfg_dout_o.
//
// Interface: rst_ni resets configuration, data path and sleep controllers;
// tick_i is the slow timebase of the sleep controllers (no part of the data
// path uses it); pg_en_o / mode_o give each cell's power switch and mode.
// A word is sent into the fabric by driving an incoming wire-set with the next
// LEDR code word and is taken as consumed when the acknowledge equals its
// phase; a word leaving the fabric is acknowledged by setting the
// acknowledge to its phase.
//
// The 2 x 2 array and one wire-set per channel side follow the architecture
// drawing; the border I/O, the chain order and the names are this design's.
//
// Lint note: the evaluate signal opens the output latch, whose new phase
// closes it again, and acknowledges loop back through the neighbours. Lint
// tools report these as combinational loops and latches; they are the
// intended self-timed handshake, not a mistake, and settle after one pass.
module async_fpga
  import fpga_pkg::*;
#(
  parameter int unsigned ROWS       = 2,
  parameter int unsigned COLS       = 2,
  parameter int unsigned K          = 4,
  parameter int unsigned IDLE_TICKS = 8,
  parameter int unsigned WAKE_TICKS = 2
) (
  input  logic                      rst_ni,
  input  logic                      tick_i,
  input  logic                      cfg_clk_i,
  input  logic                      cfg_en_i,
  input  logic                      cfg_din_i,
  output logic                      cfg_dout_o,
  // west border, one wire-set per row
  input  fwd_t     [ROWS-1:0]       west_in_i,
  output logic     [ROWS-1:0]       west_in_ack_o,
  output fwd_t     [ROWS-1:0]       west_out_o,
  input  logic     [ROWS-1:0]       west_out_ack_i,
  // east border
  input  fwd_t     [ROWS-1:0]       east_in_i,
  output logic     [ROWS-1:0]       east_in_ack_o,
  output fwd_t     [ROWS-1:0]       east_out_o,
  input  logic     [ROWS-1:0]       east_out_ack_i,
  // north border, one wire-set per column
  input  fwd_t     [COLS-1:0]       north_in_i,
  output logic     [COLS-1:0]       north_in_ack_o,
  output fwd_t     [COLS-1:0]       north_out_o,
  input  logic     [COLS-1:0]       north_out_ack_i,
  // south border
  input  fwd_t     [COLS-1:0]       south_in_i,
  output logic     [COLS-1:0]       south_in_ack_o,
  output fwd_t     [COLS-1:0]       south_out_o,
  input  logic     [COLS-1:0]       south_out_ack_i,
  // power gating status per cell
  output logic     [ROWS-1:0][COLS-1:0] pg_en_o,
  output pg_mode_e [ROWS-1:0][COLS-1:0] mode_o
);
  fwd_t [ROWS-1:0][COLS-1:0][NSIDES-1:0] c_in, c_out;
  logic [ROWS-1:0][COLS-1:0][NSIDES-1:0] c_in_ack, c_out_ack;
  logic [ROWS*COLS:0]                    chain;

  assign chain[0]   = cfg_din_i;
  assign cfg_dout_o = chain[ROWS*COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      fpga_cell #(.K(K), .IDLE_TICKS(IDLE_TICKS), .WAKE_TICKS(WAKE_TICKS)) u_cell (
        .rst_ni         (rst_ni),
        .tick_i         (tick_i),
        .cfg_clk_i      (cfg_clk_i),
        .cfg_en_i       (cfg_en_i),
        .cfg_din_i      (chain[r*COLS + c]),
        .cfg_dout_o     (chain[r*COLS + c + 1]),
        .side_in_i      (c_in[r][c]),
        .side_in_ack_o  (c_in_ack[r][c]),
        .side_out_o     (c_out[r][c]),
        .side_out_ack_i (c_out_ack[r][c]),
        .pg_en_o        (pg_en_o[r][c]),
        .mode_o         (mode_o[r][c])
      );

      // West side: border or east side of the left neighbour.
      if (c == 0) begin : g_wb
        assign c_in[r][c][SIDE_W]      = west_in_i[r];
        assign west_in_ack_o[r]        = c_in_ack[r][c][SIDE_W];
        assign west_out_o[r]           = c_out[r][c][SIDE_W];
        assign c_out_ack[r][c][SIDE_W] = west_out_ack_i[r];
      end else begin : g_wl
        assign c_in[r][c][SIDE_W]      = c_out[r][c-1][SIDE_E];
        assign c_out_ack[r][c][SIDE_W] = c_in_ack[r][c-1][SIDE_E];
      end
      // East side.
      if (c == COLS - 1) begin : g_eb
        assign c_in[r][c][SIDE_E]      = east_in_i[r];
        assign east_in_ack_o[r]        = c_in_ack[r][c][SIDE_E];
        assign east_out_o[r]           = c_out[r][c][SIDE_E];
        assign c_out_ack[r][c][SIDE_E] = east_out_ack_i[r];
      end else begin : g_el
        assign c_in[r][c][SIDE_E]      = c_out[r][c+1][SIDE_W];
        assign c_out_ack[r][c][SIDE_E] = c_in_ack[r][c+1][SIDE_W];
      end
      // North side.
      if (r == 0) begin : g_nb
        assign c_in[r][c][SIDE_N]      = north_in_i[c];
        assign north_in_ack_o[c]       = c_in_ack[r][c][SIDE_N];
        assign north_out_o[c]          = c_out[r][c][SIDE_N];
        assign c_out_ack[r][c][SIDE_N] = north_out_ack_i[c];
      end else begin : g_nl
        assign c_in[r][c][SIDE_N]      = c_out[r-1][c][SIDE_S];
        assign c_out_ack[r][c][SIDE_N] = c_in_ack[r-1][c][SIDE_S];
      end
      // South side.
      if (r == ROWS - 1) begin : g_sb
        assign c_in[r][c][SIDE_S]      = south_in_i[c];
        assign south_in_ack_o[c]       = c_in_ack[r][c][SIDE_S];
        assign south_out_o[c]          = c_out[r][c][SIDE_S];
        assign c_out_ack[r][c][SIDE_S] = south_out_ack_i[c];
      end else begin : g_sl
        assign c_in[r][c][SIDE_S]      = c_out[r+1][c][SIDE_N];
        assign c_out_ack[r][c][SIDE_S] = c_in_ack[r+1][c][SIDE_N];
      end
    end
  end
endmodule
