// tb_ledr_encoder: checks the LEDR encoder against the code table.
// For every value and phase the latch is opened and the rails must read
// V = value and R = value in phase 0, ~value in phase 1; with the latch closed
// the rails must hold whatever the inputs do. Reset must give V = R = 0.
module tb_ledr_encoder;
  logic rst_ni, load, d, p, v, r;
  int checks = 0, failures = 0;

  ledr_encoder dut (.rst_ni(rst_ni), .load_i(load), .data_i(d), .phase_i(p), .v_o(v), .r_o(r));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (v=%0b r=%0b)", msg, v, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_ni = 0; load = 0; d = 1; p = 1;
    #1 check(v == 0 && r == 0, "reset word");
    rst_ni = 1;
    #1 check(v == 0 && r == 0, "hold after reset");
    for (int it = 0; it < 64; it++) begin
      logic ed, ep, hv, hr;
      ed = 1'($urandom); ep = 1'($urandom);
      d = ed; p = ep; load = 1;
      #1;
      // code table: value on V, R equal to V in phase 0 and inverted in phase 1
      check(v == ed, "V carries the value");
      check(r == (ep ? ~ed : ed), "R per phase");
      check((v ^ r) == ep, "phase of code word");
      load = 0; hv = v; hr = r;
      #1 d = ~d; p = ~p;
      #1 check(v == hv && r == hr, "latch holds while closed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
