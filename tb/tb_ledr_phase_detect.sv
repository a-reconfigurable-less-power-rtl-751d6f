// tb_ledr_phase_detect: random LEDR input words, masks and output phases,
// compared with a bit-by-bit reference model of the completion rule.
module tb_ledr_phase_detect;
  localparam int unsigned K = 4;
  logic [K-1:0] v, r, used;
  logic out_ph, all_arr, any_arr, in_ph;
  int checks = 0, failures = 0;

  ledr_phase_detect #(.K(K)) dut (
    .in_v_i(v), .in_r_i(r), .used_i(used), .out_phase_i(out_ph),
    .all_arrived_o(all_arr), .any_arrived_o(any_arr), .in_phase_o(in_ph)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      bit e_all, e_any, e_ph, seen;
      int n_new, n_used;
      v = K'($urandom); r = K'($urandom); used = K'($urandom); out_ph = 1'($urandom);
      if (it % 3 == 0) r = v ^ {K{~out_ph}};   // every input new
      #1;
      n_new = 0; n_used = 0; seen = 0; e_ph = 0;
      for (int i = 0; i < K; i++) begin
        if (used[i]) begin
          n_used++;
          if ((v[i] != r[i]) != out_ph) n_new++;
          if (!seen) begin e_ph = v[i] != r[i]; seen = 1; end
        end
      end
      e_all = (n_used > 0) && (n_new == n_used);
      e_any = n_new > 0;
      checks++;
      if (all_arr != e_all || any_arr != e_any || in_ph != e_ph) begin
        failures++;
        $display("FAIL v=%b r=%b used=%b oph=%b: got %b%b%b exp %b%b%b",
                 v, r, used, out_ph, all_arr, any_arr, in_ph, e_all, e_any, e_ph);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
