// tb_sort_lanes: tests the lane split of the sorting units.
// - ELEM_W = 8, single cycle: four independent 8-bit lanes, each sorted in
//   place, result valid in the same cycle as the request.
// - ELEM_W = 16, STAGES = 4: two 16-bit lanes, result valid exactly 3 clock
//   edges after the request, with back-to-back requests in flight.
// Reference: per-lane descending insertion sort.
module tb_sort_lanes;
  logic clk = 1'b0, rst_n = 1'b0;
  logic v8_i, v8_o, v16_i, v16_o;
  logic [31:0] in8 [32], out8 [32], in16 [32], out16 [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sort_lanes #(.ELEM_W(8),  .NELEM(32), .FAST_CMP(1'b1), .STAGES(1)) d8 (
    .clk, .rst_n, .valid_i(v8_i), .vin_i(in8), .valid_o(v8_o), .vout_o(out8));
  sort_lanes #(.ELEM_W(16), .NELEM(32), .FAST_CMP(1'b0), .STAGES(4)) d16 (
    .clk, .rst_n, .valid_i(v16_i), .vin_i(in16), .valid_o(v16_o), .vout_o(out16));

  // expected result of sorting every W-bit lane of v in place
  function automatic void ref_lanes(ref logic [31:0] v [32], input int w);
    for (int l = 0; l < 32 / w; l++) begin
      int unsigned e [32];
      for (int i = 0; i < 32; i++) e[i] = (v[i] >> (l * w)) & ((1 << w) - 1);
      for (int i = 1; i < 32; i++) begin
        int unsigned key = e[i];
        int j = i - 1;
        while (j >= 0 && e[j] < key) begin e[j+1] = e[j]; j--; end
        e[j+1] = key;
      end
      for (int i = 0; i < 32; i++) begin
        v[i] &= ~(((32'd1 << w) - 1) << (l * w));
        v[i] |= 32'(e[i]) << (l * w);
      end
    end
  endfunction

  logic [31:0] exp16 [14][32];
  logic        issued [14];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e [32];
    v8_i = 1'b0; v16_i = 1'b0;
    foreach (in8[i])  in8[i]  = '0;
    foreach (in16[i]) in16[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // 8-bit lanes, combinational
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      foreach (in8[i]) in8[i] = $urandom;
      v8_i = 1'b1;
      #1;
      e = in8;
      ref_lanes(e, 8);
      checks++;
      if (!v8_o || out8 != e) begin
        failures++;
        $display("FAIL 8-bit lanes, request %0d", n);
      end
    end
    @(negedge clk) v8_i = 1'b0;
    // 16-bit lanes, 4 stages: requests in cycles 0,1,2,3 (back to back) and 7
    for (int c = 0; c < 14; c++) begin
      v16_i = (c < 4) || (c == 7);
      if (v16_i) begin
        foreach (in16[i]) in16[i] = $urandom;
        e = in16;
        ref_lanes(e, 16);
        exp16[c] = e;
      end
      issued[c] = v16_i;
      #1;
      // a request of cycle c must come out in cycle c+3, nothing else
      checks++;
      if (c >= 3 && issued[c-3]) begin
        if (!v16_o || out16 != exp16[c-3]) begin
          failures++; $display("FAIL 16-bit result of cycle %0d", c - 3);
        end
      end else if (v16_o) begin
        failures++; $display("FAIL spurious valid in cycle %0d", c);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
