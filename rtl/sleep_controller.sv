// sleep_controller: autonomous fine-grain power gating of one logic block.
//
// Each logic block decides for itself when to be powered. It is in one of
// four modes (pg_mode_e): SLEEP (power switch open), WAKING (switch closed,
// supply settling), STANDBY (powered, idle) and ACTIVE (powered, data pending).
//  - SLEEP -> WAKING when the predecessor raises its wake-up (data-arrival)
//    wire, or when data already stands at an input.
//  - WAKING -> STANDBY/ACTIVE after WAKE_TICKS ticks of the timebase.
//  - STANDBY <-> ACTIVE follows busy_i with no delay.
//  - STANDBY -> SLEEP only after IDLE_TICKS consecutive ticks with no
//    activity, so a block that sees steady traffic is never gated. Activity
//    is busy_i or wake_i high at the tick, or any edge of evt_i since the
//    previous tick. evt_i is the block's output phase, which toggles once per
//    evaluated word: a word can pass through a powered block between two
//    ticks without busy_i ever being high at a tick, so the edges are caught
//    by two edge-triggered flags (one per edge direction). Each flag is set to
//    the complement of its tick-side copy, so any number of edges between two
//    ticks reads as activity, and the tick copies the flag to clear it.
// Because the predecessor raises the wake-up wire as soon as it receives its
// own data, the block can be powered before its data arrives.
//
// Interface: tick_i is a slow free-running timebase used only to measure the
// idle and wake-up times; the data path itself has no clock. powered_o enables
// evaluation in the logic block; pg_en_o drives the power switch (header
// transistor) of the block's supply domain.
//
// The three modes, early wake-up by the predecessor and power-off only after
// a long idle time follow the architecture. The timebase, the counter lengths
// and the WAKING mode that models supply settling are this design's choices.
// busy_i and wake_i come from the clockless fabric and are sampled directly;
// a silicon version would put a synchroniser in front of them.
module sleep_controller
  import fpga_pkg::*;
#(
  parameter int unsigned IDLE_TICKS = 8,
  parameter int unsigned WAKE_TICKS = 2
) (
  input  logic     tick_i,
  input  logic     rst_ni,
  input  logic     busy_i,
  input  logic     wake_i,
  input  logic     evt_i,
  output logic     powered_o,
  output logic     pg_en_o,
  output pg_mode_e mode_o
);
  typedef enum logic [1:0] {S_SLEEP, S_WAKING, S_ON} state_e;

  localparam int unsigned CW = $clog2(((IDLE_TICKS > WAKE_TICKS) ? IDLE_TICKS : WAKE_TICKS) + 1);

  state_e        state_q;
  logic [CW-1:0] cnt_q;
  logic          request;
  logic          ev_rise_q, ev_fall_q, seen_rise_q, seen_fall_q;

  // Edge flags of evt_i, cleared by the tick process through seen_*_q.
  always_ff @(posedge evt_i or negedge rst_ni) begin
    if (!rst_ni) ev_rise_q <= 1'b0;
    else         ev_rise_q <= ~seen_rise_q;
  end

  always_ff @(negedge evt_i or negedge rst_ni) begin
    if (!rst_ni) ev_fall_q <= 1'b0;
    else         ev_fall_q <= ~seen_fall_q;
  end

  assign request = busy_i | wake_i | (ev_rise_q ^ seen_rise_q) | (ev_fall_q ^ seen_fall_q);

  always_ff @(posedge tick_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_SLEEP;
      cnt_q       <= '0;
      seen_rise_q <= 1'b0;
      seen_fall_q <= 1'b0;
    end else begin
      seen_rise_q <= ev_rise_q;
      seen_fall_q <= ev_fall_q;
      unique case (state_q)
        S_SLEEP: begin
          cnt_q <= '0;
          if (request) state_q <= S_WAKING;
        end
        S_WAKING: begin
          if (cnt_q == CW'(WAKE_TICKS - 1)) begin
            state_q <= S_ON;
            cnt_q   <= '0;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_ON: begin
          if (request) begin
            cnt_q <= '0;
          end else if (cnt_q == CW'(IDLE_TICKS - 1)) begin
            state_q <= S_SLEEP;
            cnt_q   <= '0;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: begin
          state_q <= S_SLEEP;
          cnt_q   <= '0;
        end
      endcase
    end
  end

  always_comb begin
    powered_o = (state_q == S_ON);
    pg_en_o   = (state_q != S_SLEEP);
    unique case (state_q)
      S_SLEEP:  mode_o = PG_SLEEP;
      S_WAKING: mode_o = PG_WAKING;
      default:  mode_o = busy_i ? PG_ACTIVE : PG_STANDBY;
    endcase
  end
endmodule
