// logic_block: self-timed LEDR logic block with its own sleep controller.
//
// A K-input look-up table computes one output bit. Inputs and output are LEDR
// wire-sets with a two-phase acknowledge: the block compares the phase of its
// inputs with the phase of its output (ledr_phase_detect), and when every used
// input carries a new word, the previous output has been acknowledged by the
// receiver (out_ack_i equals the output phase) and the block is powered, it
// opens the output latch of the LEDR encoder. The latch takes the look-up
// result in the input phase; the output phase then equals the input phase,
// which closes the latch again and, through in_ack_o, acknowledges the inputs.
// A word therefore moves on as soon as it is complete, with no clock.
//
// The sleep controller keeps the block powered while it is busy (a new input
// word has begun to arrive, or its output waits for an acknowledge) and when
// the predecessor signals that data is on the way (wake-up wire of a used
// input). The block itself drives its output wake-up wire while busy, so the
// successor starts to power up as soon as this block gets data.
//
// Interface: in_i[k] / out_o are the forward halves of the wire-sets (V, R,
// wake-up), in_ack_o (one level for all inputs) and out_ack_i the acknowledges.
// cfg_lut_i is the truth table, cfg_used_i marks the inputs that are routed;
// both come from configuration memory. tick_i is the sleep controller's
// timebase; the output word is held through sleep (the output latch and the
// configuration memory are assumed to be on the always-on supply).
//
// Following the architecture: LUT, phase comparison of input and output words,
// LEDR output encoder, registers that hold the output for the switch block, and
// a sleep controller that wakes the successor. The acknowledge convention, the
// used-input mask and the retention of the output word are this design's own.
//
// Lint note: the evaluate signal opens the output latch, whose new phase
// closes it again, and acknowledges loop back through the neighbours. Lint
// tools report these as combinational loops and latches; they are the
// intended self-timed handshake, not a mistake, and settle after one pass.
module logic_block
  import fpga_pkg::*;
#(
  parameter int unsigned K          = 4,
  parameter int unsigned IDLE_TICKS = 8,
  parameter int unsigned WAKE_TICKS = 2
) (
  input  logic              rst_ni,
  input  logic              tick_i,
  input  logic [(1<<K)-1:0] cfg_lut_i,
  input  logic [K-1:0]      cfg_used_i,
  input  fwd_t [K-1:0]      in_i,
  output logic              in_ack_o,
  output fwd_t              out_o,
  input  logic              out_ack_i,
  output logic              pg_en_o,
  output pg_mode_e          mode_o
);
  logic [K-1:0] in_v, in_r, in_wake;
  logic         all_arrived, any_arrived, in_phase;
  logic         out_phase, busy, powered, fire, lut_out;
  logic         v_q, r_q;

  always_comb begin
    for (int i = 0; i < K; i++) begin
      in_v[i]    = in_i[i].v;
      in_r[i]    = in_i[i].r;
      in_wake[i] = in_i[i].wake;
    end
  end

  assign out_phase = v_q ^ r_q;

  ledr_phase_detect #(.K(K)) u_detect (
    .in_v_i        (in_v),
    .in_r_i        (in_r),
    .used_i        (cfg_used_i),
    .out_phase_i   (out_phase),
    .all_arrived_o (all_arrived),
    .any_arrived_o (any_arrived),
    .in_phase_o    (in_phase)
  );

  lut #(.K(K)) u_lut (
    .cfg_i (cfg_lut_i),
    .in_i  (in_v & cfg_used_i),
    .out_o (lut_out)
  );

  assign busy = any_arrived | (out_ack_i != out_phase);

  sleep_controller #(.IDLE_TICKS(IDLE_TICKS), .WAKE_TICKS(WAKE_TICKS)) u_sleep (
    .tick_i    (tick_i),
    .rst_ni    (rst_ni),
    .busy_i    (busy),
    .wake_i    (|(in_wake & cfg_used_i)),
    .evt_i     (out_phase),
    .powered_o (powered),
    .pg_en_o   (pg_en_o),
    .mode_o    (mode_o)
  );

  // Evaluate: all inputs new, receiver ready, supply up.
  assign fire = powered & all_arrived & (out_ack_i == out_phase);

  ledr_encoder u_enc (
    .rst_ni  (rst_ni),
    .load_i  (fire),
    .data_i  (lut_out),
    .phase_i (in_phase),
    .v_o     (v_q),
    .r_o     (r_q)
  );

  always_comb begin
    out_o.v    = v_q;
    out_o.r    = r_q;
    out_o.wake = busy;
    in_ack_o   = out_phase;
  end

endmodule
