// tb_sort_unit: tests the recursive sorting unit at 4, 8 and 32 elements,
// with 8-bit elements through the fast comparator and 32-bit elements through
// the plain one. Inputs: random data, data with many repeats, already sorted
// and reverse-sorted data. Reference: a descending insertion sort.
module tb_sort_unit;
  logic [7:0]  d4 [4],  q4 [4];
  logic [7:0]  d8 [8],  q8 [8];
  logic [7:0]  d32 [32], q32 [32];
  logic [31:0] w32 [32], r32 [32];
  int checks = 0, failures = 0;

  sort_unit #(.N(4),  .W(8),  .FAST_CMP(1'b1)) u4   (.d_i(d4),  .q_o(q4));
  sort_unit #(.N(8),  .W(8),  .FAST_CMP(1'b1)) u8   (.d_i(d8),  .q_o(q8));
  sort_unit #(.N(32), .W(8),  .FAST_CMP(1'b1)) u32  (.d_i(d32), .q_o(q32));
  sort_unit #(.N(32), .W(32), .FAST_CMP(1'b0)) u32w (.d_i(w32), .q_o(r32));

  // descending insertion sort of v[0..n-1]
  function automatic void ref_sort(ref logic [31:0] v [32], input int n);
    for (int i = 1; i < n; i++) begin
      logic [31:0] key = v[i];
      int j = i - 1;
      while (j >= 0 && v[j] < key) begin
        v[j+1] = v[j];
        j--;
      end
      v[j+1] = key;
    end
  endfunction

  task automatic run(int kind);
    logic [31:0] e8 [32], e32 [32], e4 [32], ex8 [32];
    for (int i = 0; i < 32; i++) begin
      case (kind)
        0: begin e8[i] = 32'($urandom_range(0, 255)); e32[i] = $urandom; end
        1: begin e8[i] = 32'($urandom_range(0, 3));   e32[i] = 32'($urandom_range(0, 3)); end
        2: begin e8[i] = 32'(i * 7);                  e32[i] = 32'(i) << 20; end
        default: begin e8[i] = 32'(255 - i * 5);      e32[i] = 32'(31 - i) << 25; end
      endcase
      e4[i]  = e8[i];
      ex8[i] = e8[i];
    end
    for (int i = 0; i < 4; i++)  d4[i]  = e4[i][7:0];
    for (int i = 0; i < 8; i++)  d8[i]  = ex8[i][7:0];
    for (int i = 0; i < 32; i++) begin d32[i] = e8[i][7:0]; w32[i] = e32[i]; end
    ref_sort(e4, 4);
    ref_sort(ex8, 8);
    ref_sort(e8, 32);
    ref_sort(e32, 32);
    #1;
    checks += 4;
    for (int i = 0; i < 4; i++) if (q4[i] !== e4[i][7:0]) begin
      failures++; $display("FAIL N=4 pos %0d got %0d exp %0d", i, q4[i], e4[i]); break;
    end
    for (int i = 0; i < 8; i++) if (q8[i] !== ex8[i][7:0]) begin
      failures++; $display("FAIL N=8 pos %0d got %0d exp %0d", i, q8[i], ex8[i]); break;
    end
    for (int i = 0; i < 32; i++) if (q32[i] !== e8[i][7:0]) begin
      failures++; $display("FAIL N=32x8 pos %0d got %0d exp %0d", i, q32[i], e8[i]); break;
    end
    for (int i = 0; i < 32; i++) if (r32[i] !== e32[i]) begin
      failures++; $display("FAIL N=32x32 pos %0d got %h exp %h", i, r32[i], e32[i]); break;
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) run(0);
    for (int n = 0; n < 100; n++) run(1);
    run(2);
    run(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
