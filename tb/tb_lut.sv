// tb_lut: random truth tables and inputs against a shift-and-mask reference.
module tb_lut;
  localparam int unsigned K = 4;
  logic [(1<<K)-1:0] cfg;
  logic [K-1:0] in;
  logic out;
  int checks = 0, failures = 0;

  lut #(.K(K)) dut (.cfg_i(cfg), .in_i(in), .out_o(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      cfg = 16'($urandom);
      for (int i = 0; i < (1 << K); i++) begin
        in = K'(i);
        #1;
        checks++;
        if (out != ((cfg >> i) & 1)) begin
          failures++;
          $display("FAIL cfg=%h in=%0d out=%b", cfg, i, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
