// tb_fast_cmp: tests the 8-, 16- and 32-bit fast comparators. The 8-bit one
// is checked exhaustively; the wider ones with random pairs, pairs that
// differ in a single bit, and equal pairs. Reference: the '>' operator.
module tb_fast_cmp;
  logic [7:0]  a8,  b8;
  logic [15:0] a16, b16;
  logic [31:0] a32, b32;
  logic gt8, gt16, gt32;
  int checks = 0, failures = 0;

  fast_cmp #(.W(8))  dut8  (.a_i(a8),  .b_i(b8),  .gt_o(gt8));
  fast_cmp #(.W(16)) dut16 (.a_i(a16), .b_i(b16), .gt_o(gt16));
  fast_cmp #(.W(32)) dut32 (.a_i(a32), .b_i(b32), .gt_o(gt32));

  task automatic check_wide(logic [31:0] x, logic [31:0] y);
    a16 = x[15:0]; b16 = y[15:0]; a32 = x; b32 = y;
    #1;
    checks += 2;
    if (gt16 !== (a16 > b16)) begin failures++; $display("FAIL16 %h %h", a16, b16); end
    if (gt32 !== (a32 > b32)) begin failures++; $display("FAIL32 %h %h", a32, b32); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (gt8 !== (i > j)) begin failures++; $display("FAIL8 %0d %0d", i, j); end
      end
    end
    for (int n = 0; n < 20000; n++) check_wide($urandom, $urandom);
    for (int k = 0; k < 32; k++) begin
      x = $urandom;
      check_wide(x, x ^ (32'd1 << k));
      check_wide(x ^ (32'd1 << k), x);
      check_wide(x, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
