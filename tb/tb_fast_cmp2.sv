// tb_fast_cmp2: tests the reduced 2-bit compare unit on every input it can
// receive in the comparator tree (A_i and B_i never both high), against the
// arithmetic comparison of A and B as 2-bit numbers.
module tb_fast_cmp2;
  logic [1:0] a, b;
  logic gt;
  int checks = 0, failures = 0;

  fast_cmp2 dut (.a_i(a), .b_i(b), .gt_o(gt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        if ((i & j) != 0) continue;
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (gt !== (i > j)) begin
          failures++;
          $display("FAIL a=%b b=%b gt=%b", a, b, gt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
