// tb_fast_cmp4: exhaustive test of the 4-bit fast compare unit against the
// arithmetic comparison of the two inputs.
module tb_fast_cmp4;
  logic [3:0] a, b;
  logic lt, gt;
  int checks = 0, failures = 0;

  fast_cmp4 dut (.a_i(a), .b_i(b), .lt_o(lt), .gt_o(gt));

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
        checks++;
        if (lt !== (i < j) || gt !== (i > j)) begin
          failures++;
          $display("FAIL a=%0d b=%0d lt=%b gt=%b", i, j, lt, gt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
