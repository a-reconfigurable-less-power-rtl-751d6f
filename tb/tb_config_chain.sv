// tb_config_chain: shifts a random pattern through the chain and checks the
// parallel bits, the serial output N shifts later, and holding while disabled.
module tb_config_chain;
  localparam int unsigned N = 60;
  logic clk = 0, rst_ni, en, din, dout;
  logic [N-1:0] bits, pat;
  int checks = 0, failures = 0;

  config_chain #(.N(N)) dut (.cfg_clk_i(clk), .cfg_rst_ni(rst_ni), .cfg_en_i(en),
                             .cfg_din_i(din), .cfg_dout_o(dout), .bits_o(bits));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_ni = 0; en = 0; din = 0;
    #12 check(bits == '0, "reset clears");
    rst_ni = 1;
    pat = {$urandom, $urandom};
    for (int rep = 0; rep < 3; rep++) begin
      pat = {$urandom, $urandom};
      for (int i = N - 1; i >= 0; i--) begin
        @(negedge clk); en = 1; din = pat[i];
      end
      @(negedge clk); en = 0;
      check(bits == pat, "pattern loaded, first bit at the top");
      check(dout == pat[N-1], "serial out is the top bit");
      repeat (4) @(negedge clk);
      din = ~din;
      check(bits == pat, "holds while disabled");
      // shift once more: the top bit leaves
      en = 1; din = 1'b1;
      @(negedge clk); en = 0;
      check(bits == {pat[N-2:0], 1'b1}, "single shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
