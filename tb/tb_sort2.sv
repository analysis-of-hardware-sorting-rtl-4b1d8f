// tb_sort2: tests the two-element sorting unit with both comparators (plain
// and fast): 8-bit exhaustively, 32-bit with random and equal pairs. Max must
// be the larger input and Min the smaller.
module tb_sort2;
  logic [7:0]  a8, b8, mx8p, mn8p, mx8f, mn8f;
  logic [31:0] a32, b32, mx32p, mn32p, mx32f, mn32f;
  int checks = 0, failures = 0;

  sort2 #(.W(8),  .FAST_CMP(1'b0)) d8p  (.a_i(a8),  .b_i(b8),  .max_o(mx8p),  .min_o(mn8p));
  sort2 #(.W(8),  .FAST_CMP(1'b1)) d8f  (.a_i(a8),  .b_i(b8),  .max_o(mx8f),  .min_o(mn8f));
  sort2 #(.W(32), .FAST_CMP(1'b0)) d32p (.a_i(a32), .b_i(b32), .max_o(mx32p), .min_o(mn32p));
  sort2 #(.W(32), .FAST_CMP(1'b1)) d32f (.a_i(a32), .b_i(b32), .max_o(mx32f), .min_o(mn32f));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] hi, lo;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (mx8p !== 8'((i > j) ? i : j) || mn8p !== 8'((i > j) ? j : i) ||
            mx8f !== 8'((i > j) ? i : j) || mn8f !== 8'((i > j) ? j : i)) begin
          failures++;
          $display("FAIL8 %0d %0d", i, j);
        end
      end
    end
    for (int n = 0; n < 5000; n++) begin
      a32 = $urandom; b32 = (n % 10 == 0) ? a32 : $urandom;
      hi = (a32 > b32) ? a32 : b32;
      lo = (a32 > b32) ? b32 : a32;
      #1;
      checks++;
      if (mx32p !== hi || mn32p !== lo || mx32f !== hi || mn32f !== lo) begin
        failures++;
        $display("FAIL32 %h %h", a32, b32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
