// tb_cmp_lookahead4: exhaustive test of the compare look-ahead logic.
// For all 256 input pairs CMP must be one-hot at the most significant
// differing bit, or all zero when A == B.
module tb_cmp_lookahead4;
  logic [3:0] a, b, cmp, exp_cmp;
  int checks = 0, failures = 0;

  cmp_lookahead4 dut (.a_i(a), .b_i(b), .cmp_o(cmp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        exp_cmp = '0;
        for (int k = 3; k >= 0; k--) begin
          if (a[k] != b[k]) begin exp_cmp[k] = 1'b1; break; end
        end
        checks++;
        if (cmp !== exp_cmp) begin
          failures++;
          $display("FAIL a=%b b=%b cmp=%b exp=%b", a, b, cmp, exp_cmp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
