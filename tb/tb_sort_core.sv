// tb_sort_core: end-to-end test of the sorting core in its pipelined
// configuration (28-stage sorting lanes, plain comparator). A driver acting
// as the in-order pipeline runs vector loads, 32-, 16- and 8-bit SORTs (on
// random and on repeated-value data, then again on the sorted data), an
// unassigned funct3, a non-SORT instruction and vector stores. Every
// register is compared with a software sort and every SORT must take exactly
// 28 cycles. Afterwards it checks that each mechanism occurred: all three
// widths, pipeline stalls (27 per SORT), the illegal-instruction flag and a
// non-SORT instruction passing without a stall. A second instance is the
// single-cycle core with only the four 8-bit lanes built, where 32- and
// 16-bit SORTs must be rejected as illegal. The single-cycle default
// configuration is exercised end to end by tb_median_filter.
module tb_sort_core;
  localparam int unsigned STAGES = 28;

  int c, f, c8, f8;
  int s [3], s8 [3];
  int st, il, o, st8, il8, o8;
  logic fin, fin8;
  int checks, failures;

  sort_core_run #(.STAGES(STAGES), .FAST(1'b0)) run (
    .checks(c), .failures(f), .n_sort(s), .n_stall_cycles(st),
    .n_illegal(il), .n_other(o), .finished(fin));

  // the four-lane 8-bit system alone: 32- and 16-bit SORTs become illegal
  sort_core_run #(.STAGES(1), .FAST(1'b0), .HAS32(1'b0), .HAS16(1'b0), .HAS8(1'b1)) run8 (
    .checks(c8), .failures(f8), .n_sort(s8), .n_stall_cycles(st8),
    .n_illegal(il8), .n_other(o8), .finished(fin8));

  task automatic need(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c + c8, f + f8 + 1);
    $finish;
  end

  initial begin
    wait (fin && fin8);
    checks = c + c8;
    failures = f + f8;
    for (int m = 0; m < 3; m++) need(s[m] > 0, $sformatf("no SORT of mode %0d", m));
    need(st == (STAGES - 1) * (s[0] + s[1] + s[2]), $sformatf("stall cycles %0d", st));
    need(il > 0, "illegal funct3 never flagged");
    need(o > 0, "no non-SORT instruction");
    need(s8[2] > 0 && s8[0] == 0 && s8[1] == 0, "8-bit-only core: wrong SORT mix");
    need(st8 == 0, "8-bit-only single-cycle core stalled");
    need(il8 >= 12 + 1, $sformatf("8-bit-only core: %0d illegal flags", il8));
    $display("SORTs: %0d/%0d/%0d (32/16/8-bit), stall cycles %0d, illegal %0d, other %0d",
             s[0], s[1], s[2], st, il, o);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
