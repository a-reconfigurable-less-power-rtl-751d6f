// tb_async_fpga: end-to-end run of the 2 x 2 fabric at its default sizes.
//
// The fabric is programmed through the configuration chain to compute
//   y = ((a ^ b) & c) ^ d
// with a = west input of row 0, b = north input of column 0, c = north input
// of column 1, d = west input of row 1:
//   cell (0,0)  a ^ b            inputs W, N   output to E
//   cell (0,1)  (0,0) & c        inputs W, N   output to S
//   cell (1,0)  buffer of d      input  W      output to E
//   cell (1,1)  (0,1) ^ (1,0)    inputs N, W   output to E and S (fanout)
// y leaves on the east border of row 1 and the south border of column 1.
// The testbench plays the environment with LEDR words and two-phase
// acknowledges, computes y itself, and counts each mechanism of the fabric:
// configuration load, words in each LEDR phase, handshake stalls, the fanout
// acknowledge join, power-off after idle, wake-up ahead of data through the
// data-arrival wires, and data waiting for a block to power up. A mechanism
// that never happened counts as a failure. Finally the fabric is reset and
// reprogrammed for a second path that runs west and north, with one cell used
// for routing only, and an unused block that must stay powered off.
module tb_async_fpga;
  import fpga_pkg::*;
  localparam int unsigned ROWS = 2, COLS = 2, K = 4, IDLE = 8, WAKE = 2;
  localparam int unsigned NSRC = NSIDES + 1, NDST = NSIDES + K;
  localparam int unsigned NB = (1 << K) + K + NDST * NSRC;
  localparam int unsigned NCELL = ROWS * COLS;
  localparam int unsigned SRC_LB = NSIDES;      // logic block output as source
  localparam int unsigned DST_IN0 = NSIDES;     // logic block input 0 as destination

  logic rst_ni, tick = 0, cfg_clk = 0, cfg_en, cfg_din, cfg_dout;
  fwd_t [ROWS-1:0] west_in, west_out, east_in, east_out;
  logic [ROWS-1:0] west_in_ack, west_out_ack, east_in_ack, east_out_ack;
  fwd_t [COLS-1:0] north_in, north_out, south_in, south_out;
  logic [COLS-1:0] north_in_ack, north_out_ack, south_in_ack, south_out_ack;
  logic [ROWS-1:0][COLS-1:0] pg_en;
  pg_mode_e [ROWS-1:0][COLS-1:0] mode;

  async_fpga dut (
    .rst_ni(rst_ni), .tick_i(tick), .cfg_clk_i(cfg_clk), .cfg_en_i(cfg_en),
    .cfg_din_i(cfg_din), .cfg_dout_o(cfg_dout),
    .west_in_i(west_in), .west_in_ack_o(west_in_ack), .west_out_o(west_out), .west_out_ack_i(west_out_ack),
    .east_in_i(east_in), .east_in_ack_o(east_in_ack), .east_out_o(east_out), .east_out_ack_i(east_out_ack),
    .north_in_i(north_in), .north_in_ack_o(north_in_ack), .north_out_o(north_out), .north_out_ack_i(north_out_ack),
    .south_in_i(south_in), .south_in_ack_o(south_in_ack), .south_out_o(south_out), .south_out_ack_i(south_out_ack),
    .pg_en_o(pg_en), .mode_o(mode));

  always #5 tick = ~tick;
  always #2 cfg_clk = ~cfg_clk;

  int checks = 0, failures = 0;
  int n_cfg = 0, n_words = 0, n_ph0 = 0, n_ph1 = 0, n_stall = 0, n_fanout = 0;
  int n_sleep = 0, n_wake_ahead = 0, n_wake_on_data = 0;

  // environment state: input streams 0..3 = a, b, c, d
  logic [3:0] ph, val;
  logic y_ph;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic logic [NB-1:0] cell_cfg(input logic [15:0] lut, input logic [K-1:0] used,
                                             input int d0, input int s0, input int d1, input int s1,
                                             input int d2, input int s2, input int d3, input int s3);
    logic [NDST-1:0][NSRC-1:0] sw;
    sw = '0;
    if (d0 >= 0) sw[d0][s0] = 1'b1;
    if (d1 >= 0) sw[d1][s1] = 1'b1;
    if (d2 >= 0) sw[d2][s2] = 1'b1;
    if (d3 >= 0) sw[d3][s3] = 1'b1;
    return {sw, used, lut};
  endfunction

  function automatic fwd_t ledr(input logic d, input logic p, input logic w);
    return '{v: d, r: d ^ p, wake: w};
  endfunction

  // drive input stream i with the next word
  task automatic send(input int i, input logic d);
    ph[i] = ~ph[i];
    val[i] = d;
    case (i)
      0: west_in[0]  = ledr(d, ph[i], west_in[0].wake);
      1: north_in[0] = ledr(d, ph[i], north_in[0].wake);
      2: north_in[1] = ledr(d, ph[i], north_in[1].wake);
      default: west_in[1] = ledr(d, ph[i], west_in[1].wake);
    endcase
  endtask

  function automatic logic [3:0] in_acks();
    return {west_in_ack[1], north_in_ack[1], north_in_ack[0], west_in_ack[0]};
  endfunction

  function automatic logic y_ref();
    return ((val[0] ^ val[1]) & val[2]) ^ val[3];
  endfunction

  // wait for a condition, counting timebase ticks
  task automatic wait_out(input logic p, output int nt);
    nt = 0;
    while (!(((east_out[1].v ^ east_out[1].r) == p) && ((south_out[1].v ^ south_out[1].r) == p)) && nt < 100) begin
      @(posedge tick); #1; nt++;
    end
  endtask

  task automatic send_all(input logic [3:0] d);
    for (int i = 0; i < 4; i++) send(i, d[i]);
    #1;
  endtask

  // one complete transfer: inputs in, result out and checked, result acknowledged
  task automatic transfer(input logic [3:0] d, output int nt);
    send_all(d);
    y_ph = ~y_ph;
    wait_out(y_ph, nt);
    check(nt < 100, "result arrives");
    check(east_out[1].v == y_ref() && south_out[1].v == y_ref(), "result value");
    check(in_acks() == ph, "all inputs acknowledged");
    n_words++;
    if (y_ph) n_ph1++; else n_ph0++;
    east_out_ack[1] = y_ph; south_out_ack[1] = y_ph;
    #1;
  endtask

  // power-mode monitor
  pg_mode_e prev [ROWS][COLS];
  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) prev[r][c] = PG_SLEEP;
    forever begin
      @(posedge tick); #1;
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
        if (rst_ni && mode[r][c] == PG_SLEEP && prev[r][c] != PG_SLEEP) n_sleep++;
        if (rst_ni && mode[r][c] == PG_WAKING && prev[r][c] == PG_SLEEP) begin
          // woken with data already waiting, or by the wake-up wire ahead of it
          if (mode_busy(r, c)) n_wake_on_data++; else n_wake_ahead++;
        end
        prev[r][c] = mode[r][c];
      end
    end
  end

  function automatic logic mode_busy(input int r, input int c);
    case ({r[0], c[0]})
      2'b00: return dut.g_row[0].g_col[0].u_cell.u_lb.any_arrived;
      2'b01: return dut.g_row[0].g_col[1].u_cell.u_lb.any_arrived;
      2'b10: return dut.g_row[1].g_col[0].u_cell.u_lb.any_arrived;
      default: return dut.g_row[1].g_col[1].u_cell.u_lb.any_arrived;
    endcase
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NCELL*NB-1:0] chain;
    logic [NB-1:0] c00, c01, c10, c11;
    int nt, nt_cold;
    rst_ni = 0; cfg_en = 0; cfg_din = 0;
    west_in = '0; east_in = '0; north_in = '0; south_in = '0;
    west_out_ack = '0; east_out_ack = '0; north_out_ack = '0; south_out_ack = '0;
    ph = '0; val = '0; y_ph = 0;
    #20 rst_ni = 1;

    // ---- configuration ----
    c00 = cell_cfg(16'h6666, 4'b0011, DST_IN0, SIDE_W, DST_IN0 + 1, SIDE_N, SIDE_E, SRC_LB, -1, 0);
    c01 = cell_cfg(16'h8888, 4'b0011, DST_IN0, SIDE_W, DST_IN0 + 1, SIDE_N, SIDE_S, SRC_LB, -1, 0);
    c10 = cell_cfg(16'hAAAA, 4'b0001, DST_IN0, SIDE_W, SIDE_E, SRC_LB, -1, 0, -1, 0);
    c11 = cell_cfg(16'h6666, 4'b0011, DST_IN0, SIDE_N, DST_IN0 + 1, SIDE_W, SIDE_E, SRC_LB, SIDE_S, SRC_LB);
    chain = {c11, c10, c01, c00};
    for (int i = NCELL * NB - 1; i >= 0; i--) begin
      @(negedge cfg_clk); cfg_en = 1; cfg_din = chain[i];
    end
    @(negedge cfg_clk); cfg_en = 0;
    check(cfg_dout == chain[NCELL*NB-1], "configuration chain output");
    check(dut.g_row[1].g_col[1].u_cell.cfg == c11 && dut.g_row[0].g_col[0].u_cell.cfg == c00,
          "configuration bits in place");
    n_cfg++;

    // ---- first word: whole fabric asleep, no wake-up ahead ----
    check(mode == {4{PG_SLEEP}}, "fabric asleep after reset");
    @(posedge tick); #2;
    transfer(4'b0101, nt_cold);
    $display("cold start: result after %0d ticks", nt_cold);
    // every block wakes in parallel because each block raises the wake-up
    // wire of its successor as soon as it gets data
    check(nt_cold <= WAKE + 2, "wake-ups overlap along the path");

    // ---- steady stream, all blocks powered ----
    for (int w = 0; w < 100; w++) begin
      transfer(4'($urandom), nt);
      check(nt == 0, "powered fabric passes a word with no tick of delay");
      if (nt != 0) $display("w=%0d nt=%0d modes=%p", w, nt, mode);
    end

    // ---- handshake stall: result not acknowledged ----
    begin
      logic [3:0] w1, w2, w3;
      logic y1, y2, y3;
      w1 = 4'($urandom); w2 = 4'($urandom); w3 = 4'($urandom);
      send_all(w1); y1 = y_ref();
      y_ph = ~y_ph;
      wait_out(y_ph, nt);
      check(east_out[1].v == y1, "first word out");
      // two more words while the first is unacknowledged: the second fills
      // the blocks in front of the output, the third must be refused
      send_all(w2); y2 = y_ref();
      #5;
      check((east_out[1].v ^ east_out[1].r) == y_ph && east_out[1].v == y1,
            "output holds while unacknowledged");
      check(in_acks() == ph, "second word absorbed by the pipeline");
      send_all(w3); y3 = y_ref();
      #5;
      check(in_acks() != ph, "third word refused at the inputs");
      if (in_acks() != ph) n_stall++;
      // fanout: only the east receiver acknowledges
      east_out_ack[1] = y_ph;
      #5;
      check((east_out[1].v ^ east_out[1].r) == y_ph, "fanout waits for the south receiver");
      if ((east_out[1].v ^ east_out[1].r) == y_ph) n_fanout++;
      south_out_ack[1] = y_ph;
      #1;
      y_ph = ~y_ph;
      wait_out(y_ph, nt);
      check(east_out[1].v == y2 && south_out[1].v == y2, "second word delivered after acknowledge");
      east_out_ack[1] = y_ph; south_out_ack[1] = y_ph;
      #1;
      y_ph = ~y_ph;
      wait_out(y_ph, nt);
      check(east_out[1].v == y3 && south_out[1].v == y3, "third word delivered");
      check(in_acks() == ph, "refused inputs acknowledged in the end");
      n_words += 3;
      east_out_ack[1] = y_ph; south_out_ack[1] = y_ph;
      #1;
    end

    // ---- idle: everything powers off ----
    repeat (IDLE + 4) @(posedge tick);
    #1 check(mode == {4{PG_SLEEP}}, "idle fabric powered off");
    check(pg_en == '0, "all power switches open");

    // ---- wake-up ahead of data from the environment ----
    west_in[0].wake = 1; north_in[0].wake = 1; north_in[1].wake = 1; west_in[1].wake = 1;
    repeat (WAKE + 2) @(posedge tick);
    #1;
    check(mode[0][0] != PG_SLEEP && mode[0][1] != PG_SLEEP && mode[1][0] != PG_SLEEP,
          "border blocks powered by the data-arrival wires");
    transfer(4'($urandom), nt);
    check(nt <= WAKE + 1, "pre-woken fabric: at most one wake-up on the path");
    west_in[0].wake = 0; north_in[0].wake = 0; north_in[1].wake = 0; west_in[1].wake = 0;

    // ---- random traffic with random gaps, some long enough to sleep ----
    for (int w = 0; w < 60; w++) begin
      repeat ($urandom_range(0, 2 * IDLE)) @(posedge tick);
      #2;
      transfer(4'($urandom), nt);
    end

    // ---- reconfiguration: a path running west and north ----
    // east input of row 1 -> cell (1,1) inverts -> west -> cell (1,0) routes
    // east to north without its logic block -> cell (0,0) buffers from south
    // -> west border of row 0. Cells (0,1) and (1,0) logic blocks unused.
    rst_ni = 0; #20 rst_ni = 1;
    c00 = cell_cfg(16'hAAAA, 4'b0001, DST_IN0, SIDE_S, SIDE_W, SRC_LB, -1, 0, -1, 0);
    c01 = '0;
    c10 = cell_cfg(16'h0000, 4'b0000, SIDE_N, SIDE_E, -1, 0, -1, 0, -1, 0);
    c11 = cell_cfg(16'h5555, 4'b0001, DST_IN0, SIDE_E, SIDE_W, SRC_LB, -1, 0, -1, 0);
    chain = {c11, c10, c01, c00};
    for (int i = NCELL * NB - 1; i >= 0; i--) begin
      @(negedge cfg_clk); cfg_en = 1; cfg_din = chain[i];
    end
    @(negedge cfg_clk); cfg_en = 0;
    check(dut.g_row[1].g_col[0].u_cell.cfg == c10, "second configuration in place");
    n_cfg++;
    begin
      logic p_in, p_out, d;
      p_in = 0; p_out = 0;
      for (int w = 0; w < 50; w++) begin
        d = 1'($urandom);
        p_in = ~p_in;
        east_in[1] = ledr(d, p_in, 1'b0);
        nt = 0;
        while (((west_out[0].v ^ west_out[0].r) == p_out) && nt < 100) begin @(posedge tick); #1; nt++; end
        p_out = ~p_out;
        check((west_out[0].v ^ west_out[0].r) == p_out && west_out[0].v == ~d, "westward path result");
        check(east_in_ack[1] == p_in, "westward input acknowledged");
        west_out_ack[0] = p_out;
        #1;
        if (w % 7 == 0) begin
          repeat ($urandom_range(0, 2 * IDLE)) @(posedge tick);
          #2;
        end
        n_words++;
      end
      check(mode[0][1] == PG_SLEEP, "unused block stays powered off");
    end

    $display("mechanisms: cfg=%0d words=%0d ph0=%0d ph1=%0d stall=%0d fanout=%0d sleep=%0d wake_ahead=%0d wake_on_data=%0d",
             n_cfg, n_words, n_ph0, n_ph1, n_stall, n_fanout, n_sleep, n_wake_ahead, n_wake_on_data);
    check(n_cfg > 1, "configuration load and reconfiguration happened");
    check(n_ph0 > 0 && n_ph1 > 0, "both LEDR phases used");
    check(n_stall > 0, "handshake stall happened");
    check(n_fanout > 0, "fanout acknowledge join happened");
    check(n_sleep > 0, "power-off happened");
    check(n_wake_ahead > 0, "wake-up ahead of data happened");
    check(n_wake_on_data > 0, "data waiting for wake-up happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
