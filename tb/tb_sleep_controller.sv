// tb_sleep_controller: walks the power-gating modes and counts ticks.
// Checks: start asleep; a wake request gives WAKING for exactly WAKE_TICKS
// ticks; busy gives ACTIVE, idle STANDBY; a short idle gap does not power
// off; IDLE_TICKS idle ticks do; busy alone (no wake wire) also wakes.
module tb_sleep_controller;
  import fpga_pkg::*;
  localparam int unsigned IDLE = 8, WAKE = 2;
  logic tick = 0, rst_ni, busy, wake, evt, powered, pg_en;
  pg_mode_e mode;
  int checks = 0, failures = 0;

  sleep_controller #(.IDLE_TICKS(IDLE), .WAKE_TICKS(WAKE)) dut (
    .tick_i(tick), .rst_ni(rst_ni), .busy_i(busy), .wake_i(wake), .evt_i(evt),
    .powered_o(powered), .pg_en_o(pg_en), .mode_o(mode));

  always #5 tick = ~tick;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s (mode=%0d)", $time, msg, mode); end
  endtask

  task automatic ticks(input int n);
    repeat (n) @(posedge tick);
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst_ni = 0; busy = 0; wake = 0; evt = 0;
    #7 check(mode == PG_SLEEP && !pg_en && !powered, "reset: asleep");
    rst_ni = 1;
    ticks(3);
    check(mode == PG_SLEEP, "stays asleep without requests");
    // wake-up request ahead of data
    wake = 1;
    ticks(1);
    check(mode == PG_WAKING && pg_en && !powered, "waking after request");
    n = 0;
    while (!powered && n < 20) begin ticks(1); n++; end
    check(n == WAKE, $sformatf("wake-up takes %0d ticks, got %0d", WAKE, n));
    check(mode == PG_STANDBY, "standby while nothing pending");
    wake = 0; busy = 1;
    #1 check(mode == PG_ACTIVE, "active while busy");
    ticks(IDLE + 4);
    check(powered, "busy keeps power");
    busy = 0;
    #1 check(mode == PG_STANDBY, "standby when idle");
    ticks(IDLE - 2);
    check(powered, "short idle gap keeps power");
    busy = 1; ticks(1); busy = 0;
    n = 0;
    while (powered && n < 40) begin ticks(1); n++; end
    check(n == IDLE, $sformatf("powers off after %0d idle ticks, got %0d", IDLE, n));
    check(mode == PG_SLEEP && !pg_en, "asleep again");
    // traffic that never shows busy at a tick: two words (evt toggles twice)
    // per tick period must still count as activity
    busy = 1; ticks(1); busy = 0;
    ticks(WAKE);
    check(powered, "powered for the burst test");
    for (int i = 0; i < 3 * IDLE; i++) begin
      #2 evt = ~evt;
      #2 evt = ~evt;
      ticks(1);
    end
    check(powered, "evaluations between ticks keep power");
    n = 0;
    while (powered && n < 40) begin ticks(1); n++; end
    check(n == IDLE, $sformatf("last word then %0d idle ticks, got %0d", IDLE, n));
    // data standing at an input wakes the block too
    busy = 1;
    ticks(1);
    check(mode == PG_WAKING, "busy alone wakes");
    ticks(WAKE);
    check(mode == PG_ACTIVE, "active after wake-up");
    busy = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
