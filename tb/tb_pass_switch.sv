// tb_pass_switch: all enable / wire combinations; a closed switch passes the
// forward wires A->B and the acknowledge B->A, an open one drives zeros.
module tb_pass_switch;
  import fpga_pkg::*;
  logic en, a_ack, b_ack;
  fwd_t a, b;
  int checks = 0, failures = 0;

  pass_switch dut (.en_i(en), .a_fwd_i(a), .a_ack_o(a_ack), .b_fwd_o(b), .b_ack_i(b_ack));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {en, a, b_ack} = 5'(i);
      #1;
      checks++;
      if (b != (en ? a : 3'b000) || a_ack != (en & b_ack)) begin
        failures++;
        $display("FAIL en=%b a=%b back=%b -> b=%b aack=%b", en, a, b_ack, b, a_ack);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
