// tb_fpga_cell: one cell programmed through its configuration chain.
// The logic block computes the AND of its west and north inputs and drives
// the east side; a second route passes the south input straight through the
// switch block to the north side. Both paths are checked word by word with
// LEDR phases and acknowledges, including a stall on the east side.
module tb_fpga_cell;
  import fpga_pkg::*;
  localparam int unsigned K = 4, NSRC = NSIDES + 1, NDST = NSIDES + K;
  localparam int unsigned NB = (1 << K) + K + NDST * NSRC;
  logic rst_ni, tick = 0, cfg_clk = 0, cfg_en, cfg_din, cfg_dout, pg_en;
  fwd_t [NSIDES-1:0] sin, sout;
  logic [NSIDES-1:0] sin_ack, sout_ack;
  pg_mode_e mode;
  int checks = 0, failures = 0;

  fpga_cell #(.K(K)) dut (
    .rst_ni(rst_ni), .tick_i(tick), .cfg_clk_i(cfg_clk), .cfg_en_i(cfg_en),
    .cfg_din_i(cfg_din), .cfg_dout_o(cfg_dout), .side_in_i(sin), .side_in_ack_o(sin_ack),
    .side_out_o(sout), .side_out_ack_i(sout_ack), .pg_en_o(pg_en), .mode_o(mode));

  always #5 tick = ~tick;
  always #2 cfg_clk = ~cfg_clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic logic ph(input fwd_t f);
    return f.v ^ f.r;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NDST-1:0][NSRC-1:0] sw;
    logic [NB-1:0] cfg;
    logic pw, pn, ps, pe, a, b, s;
    int n;
    rst_ni = 0; cfg_en = 0; cfg_din = 0; sin = '0; sout_ack = '0;
    #10 rst_ni = 1;
    sw = '0;
    sw[NSIDES + 0][SIDE_W] = 1;       // LB input 0 <- west
    sw[NSIDES + 1][SIDE_N] = 1;       // LB input 1 <- north
    sw[SIDE_E][NSIDES] = 1;           // east <- LB
    sw[SIDE_N][SIDE_S] = 1;           // north <- south (through route)
    cfg = {sw, 4'b0011, 16'h8888};    // AND of inputs 0 and 1
    for (int i = NB - 1; i >= 0; i--) begin
      @(negedge cfg_clk); cfg_en = 1; cfg_din = cfg[i];
    end
    @(negedge cfg_clk); cfg_en = 0;
    check(dut.cfg == cfg, "configuration loaded");
    check(cfg_dout == cfg[NB-1], "chain output");
    pw = 0; pn = 0; ps = 0; pe = 0;
    for (int w = 0; w < 100; w++) begin
      a = 1'($urandom); b = 1'($urandom); s = 1'($urandom);
      pw = ~pw; pn = ~pn; ps = ~ps;
      sin[SIDE_W] = '{v: a, r: a ^ pw, wake: 1'b0};
      sin[SIDE_N] = '{v: b, r: b ^ pn, wake: 1'b0};
      sin[SIDE_S] = '{v: s, r: s ^ ps, wake: 1'b0};
      #1;
      // through route is immediate
      check(sout[SIDE_N].v == s && ph(sout[SIDE_N]) == ps, "south to north route");
      sout_ack[SIDE_N] = ps;
      #1 check(sin_ack[SIDE_S] == ps, "acknowledge routed back to south");
      n = 0;
      while (ph(sout[SIDE_E]) == pe && n < 10) begin @(posedge tick); #1; n++; end
      pe = ~pe;
      check(ph(sout[SIDE_E]) == pe && sout[SIDE_E].v == (a & b), "logic block result on east");
      check(sin_ack[SIDE_W] == pw && sin_ack[SIDE_N] == pn, "inputs acknowledged");
      if (w % 10 == 3) begin
        // stall: next inputs before the east acknowledge
        pw = ~pw; pn = ~pn;
        sin[SIDE_W] = '{v: ~a, r: ~a ^ pw, wake: 1'b0};
        sin[SIDE_N] = '{v: 1'b1, r: 1'b1 ^ pn, wake: 1'b0};
        #3 check(ph(sout[SIDE_E]) == pe && sin_ack[SIDE_W] != pw, "stall without east acknowledge");
        sout_ack[SIDE_E] = pe;
        #1 pe = ~pe;
        check(ph(sout[SIDE_E]) == pe && sout[SIDE_E].v == ~a, "stalled word after acknowledge");
      end
      sout_ack[SIDE_E] = pe;
      #1;
    end
    check(sout[SIDE_W] == '0 && sout[SIDE_S] == '0, "unrouted sides stay low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
