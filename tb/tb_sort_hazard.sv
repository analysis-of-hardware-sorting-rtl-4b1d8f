// tb_sort_hazard: tests the pipeline hold at 28 stages (the pipelined
// sorting unit) and at 1 stage (the single-cycle unit). A requester keeps a
// SORT in place while stall is high; the test measures how many cycles each
// SORT occupies (expected: STAGES) and checks start/done pulses.
module tb_sort_hazard;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req28, st28, stall28, done28;
  logic req1, st1, stall1, done1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sort_hazard #(.STAGES(28)) d28 (.clk, .rst_n, .req_i(req28), .start_o(st28), .stall_o(stall28), .done_o(done28));
  sort_hazard #(.STAGES(1))  d1  (.clk, .rst_n, .req_i(req1),  .start_o(st1),  .stall_o(stall1),  .done_o(done1));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, starts;
    req28 = 0; req1 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // three SORTs back to back, then one after a gap, at 28 stages
    for (int k = 0; k < 4; k++) begin
      if (k == 3) begin
        req28 = 0;
        repeat (3) begin @(negedge clk); #1 chk(!stall28 && !done28 && !st28, "idle"); end
      end
      req28 = 1;
      cycles = 0; starts = 0;
      do begin
        #1;
        cycles++;
        if (st28) starts++;
        chk(!(stall28 && done28), "stall and done together");
        if (done28) break;
        @(negedge clk);
      end while (cycles < 100);
      chk(cycles == 28, $sformatf("SORT %0d took %0d cycles, expected 28", k, cycles));
      chk(starts == 1, "one start per SORT");
      @(negedge clk);
    end
    req28 = 0;
    // single-stage: never stalls, start and done in the same cycle
    for (int k = 0; k < 5; k++) begin
      req1 = 1;
      #1;
      chk(st1 && done1 && !stall1, "single-cycle SORT");
      @(negedge clk);
    end
    req1 = 0;
    #1 chk(!st1 && !done1 && !stall1, "single-stage idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
