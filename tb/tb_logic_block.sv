// tb_logic_block: drives a logic block through the LEDR handshake and the
// power-gating cycle. The truth table is random and the block uses inputs
// 0..2. The testbench keeps its own phase bookkeeping and reference function
// and checks: nothing fires until every used input is new; the output word is
// f(inputs) in the input phase; the inputs are acknowledged with that phase;
// a missing output acknowledge stalls the next word; wake-up ahead of data
// powers the block in WAKE_TICKS ticks; after IDLE_TICKS idle ticks it sleeps;
// data reaching a sleeping block waits for the wake-up and is then processed.
module tb_logic_block;
  import fpga_pkg::*;
  localparam int unsigned K = 4, IDLE = 8, WAKE = 2;
  logic tick = 0, rst_ni;
  logic [(1<<K)-1:0] cfg_lut;
  logic [K-1:0] cfg_used;
  fwd_t [K-1:0] in;
  logic in_ack, out_ack, pg_en;
  fwd_t out;
  pg_mode_e mode;
  logic [K-1:0] in_ph, in_val;
  logic exp_ph;
  int checks = 0, failures = 0;

  logic_block #(.K(K), .IDLE_TICKS(IDLE), .WAKE_TICKS(WAKE)) dut (
    .rst_ni(rst_ni), .tick_i(tick), .cfg_lut_i(cfg_lut), .cfg_used_i(cfg_used),
    .in_i(in), .in_ack_o(in_ack), .out_o(out), .out_ack_i(out_ack),
    .pg_en_o(pg_en), .mode_o(mode));

  always #5 tick = ~tick;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  task automatic ticks(input int n);
    repeat (n) @(posedge tick);
    #1;
  endtask

  task automatic send(input int i, input logic d);
    in_ph[i]  = ~in_ph[i];
    in_val[i] = d;
    in[i].v   = d;
    in[i].r   = d ^ in_ph[i];
    #1;
  endtask

  function automatic logic ref_f();
    logic [K-1:0] idx;
    idx = in_val & cfg_used;
    return cfg_lut[idx];
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic e;
    rst_ni = 0; cfg_lut = 16'($urandom); cfg_used = 4'b0111;
    in = '0; in_ph = '0; in_val = '0; out_ack = 0; exp_ph = 0;
    #7;
    rst_ni = 1;
    check(mode == PG_SLEEP, "starts asleep");
    check(out.v == 0 && out.r == 0 && in_ack == 0, "reset word");
    // predecessor announces data: wake-up ahead of data
    in[0].wake = 1;
    ticks(1);
    check(mode == PG_WAKING, "wake-up wire starts power-up");
    n = 0;
    while (mode == PG_WAKING && n < 20) begin ticks(1); n++; end
    check(n == WAKE, $sformatf("wake-up in %0d ticks (got %0d)", WAKE, n));
    check(mode == PG_STANDBY, "standby before data");
    // partial arrival: no evaluation, but activity
    send(0, 1); send(1, 0);
    check((out.v ^ out.r) == 0, "no fire before all used inputs are new");
    check(mode == PG_ACTIVE && out.wake, "busy block is active and wakes successor");
    send(3, 1); in_ph[3] = ~in_ph[3]; in[3] = '0;    // unused input is ignored
    check((out.v ^ out.r) == 0, "unused input does not count");
    e = 0;
    send(2, 1);
    exp_ph = ~exp_ph;
    check((out.v ^ out.r) == exp_ph, "fires when the last used input arrives");
    check(out.v == ref_f(), "output value is the LUT function");
    check(in_ack == exp_ph, "inputs acknowledged with the new phase");
    // next word before the output is acknowledged: stall
    send(0, 0); send(1, 1); send(2, 0);
    check((out.v ^ out.r) == exp_ph, "stalled while output unacknowledged");
    e = ref_f();
    out_ack = exp_ph;
    #1;
    exp_ph = ~exp_ph;
    check((out.v ^ out.r) == exp_ph && out.v == e, "stalled word goes after acknowledge");
    ticks(1);   // align to the timebase so the idle count starts here
    out_ack = exp_ph;
    in[0].wake = 0;
    #1 check(mode == PG_STANDBY && !out.wake, "idle block is in standby");
    // idle: power off after IDLE ticks
    n = 0;
    while (mode != PG_SLEEP && n < 40) begin ticks(1); n++; end
    check(n == IDLE, $sformatf("sleeps after %0d idle ticks (got %0d)", IDLE, n));
    check(!pg_en, "power switch open");
    check((out.v ^ out.r) == exp_ph, "output word held through sleep");
    // data without wake-up: waits for power, then goes
    send(0, 1); send(1, 1); send(2, 1);
    check((out.v ^ out.r) == exp_ph, "sleeping block does not evaluate");
    n = 0;
    while ((out.v ^ out.r) == exp_ph && n < 20) begin ticks(1); n++; end
    exp_ph = ~exp_ph;
    check(n == WAKE + 1, $sformatf("data waits for wake-up, %0d ticks (got %0d)", WAKE + 1, n));
    check(out.v == ref_f(), "value after wake-up");
    out_ack = exp_ph;
    // random stream with random acknowledge delays
    for (int w = 0; w < 200; w++) begin
      int order;
      cfg_lut = cfg_lut;  // table fixed during operation
      order = $urandom_range(0, 2);
      for (int j = 0; j < 3; j++) send((order + j) % 3, 1'($urandom));
      exp_ph = ~exp_ph;
      check((out.v ^ out.r) == exp_ph, "stream: phase advances");
      check(out.v == ref_f(), "stream: value");
      check(in_ack == exp_ph, "stream: input acknowledge");
      #($urandom_range(1, 30));
      out_ack = exp_ph;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
