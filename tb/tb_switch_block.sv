// tb_switch_block: random routing patterns (at most one source per
// destination, any number of destinations per source) with random forward
// words and acknowledges. Forward wires are checked against the selected
// source; each source acknowledge against a C-element reference that follows
// the enabled acknowledges when they agree and holds otherwise. A directed
// fanout case checks that a driver waits for the slower of two receivers.
module tb_switch_block;
  import fpga_pkg::*;
  localparam int unsigned K = 4, NSRC = NSIDES + 1, NDST = NSIDES + K;
  logic rst_ni;
  logic [NDST-1:0][NSRC-1:0] cfg;
  fwd_t [NSIDES-1:0] side_in, side_out;
  logic [NSIDES-1:0] side_in_ack, side_out_ack;
  fwd_t lb_out;
  logic lb_out_ack;
  fwd_t [K-1:0] lb_in;
  logic [K-1:0] lb_in_ack;
  fwd_t [NSRC-1:0] src;
  fwd_t [NDST-1:0] dst;
  logic [NDST-1:0] dack;
  logic [NSRC-1:0] sack, model;
  int sel [NDST];
  int checks = 0, failures = 0;

  switch_block #(.K(K)) dut (
    .rst_ni(rst_ni), .cfg_i(cfg), .side_in_i(side_in), .side_in_ack_o(side_in_ack),
    .side_out_o(side_out), .side_out_ack_i(side_out_ack), .lb_out_i(lb_out),
    .lb_out_ack_o(lb_out_ack), .lb_in_o(lb_in), .lb_in_ack_i(lb_in_ack));

  always_comb begin
    {lb_out, side_in} = src;
    {lb_in_ack, side_out_ack} = dack;
    dst  = {lb_in, side_out};
    sack = {lb_out_ack, side_in_ack};
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_ni = 0; cfg = '0; src = '0; dack = '0; model = '0;
    #2 rst_ni = 1;
    for (int it = 0; it < 1000; it++) begin
      if (it % 8 == 0) begin
        cfg = '0;
        for (int d = 0; d < NDST; d++) begin
          sel[d] = $urandom_range(0, NSRC);          // NSRC means unconnected
          if (sel[d] < NSRC) cfg[d][sel[d]] = 1'b1;
        end
      end
      src  = {NSRC{3'($urandom)}};
      for (int s = 0; s < NSRC; s++) src[s] = 3'($urandom);
      dack = NDST'($urandom);
      #1;
      for (int d = 0; d < NDST; d++)
        check(dst[d] == ((sel[d] < NSRC) ? src[sel[d]] : 3'b000),
              $sformatf("forward to destination %0d", d));
      for (int s = 0; s < NSRC; s++) begin
        bit any, hi, lo;
        any = 0; hi = 1; lo = 1;
        for (int d = 0; d < NDST; d++) if (sel[d] == s) begin
          any = 1;
          if (dack[d]) lo = 0; else hi = 0;
        end
        if (any && (hi || lo)) model[s] = hi;
        check(sack[s] == model[s], $sformatf("acknowledge join of source %0d", s));
      end
    end
    // directed fanout: west input to east output and logic block input 0
    rst_ni = 0; cfg = '0; dack = '0; #1 rst_ni = 1;
    cfg[SIDE_E][SIDE_W] = 1; cfg[NSIDES][SIDE_W] = 1;
    dack[SIDE_E] = 1;
    #1 check(side_in_ack[SIDE_W] == 0, "fanout waits for the second receiver");
    dack[NSIDES] = 1;
    #1 check(side_in_ack[SIDE_W] == 1, "fanout acknowledges when both have");
    dack[SIDE_E] = 0;
    #1 check(side_in_ack[SIDE_W] == 1, "fanout holds while receivers differ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
