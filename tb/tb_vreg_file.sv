// tb_vreg_file: tests the vector register file: reset to zero, element
// writes and reads against a shadow copy, type and vector-length registers,
// the full-width view, and a bulk write of all registers in one cycle.
module tb_vreg_file;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we, twe, vlwe, bulk_we;
  logic [4:0] waddr, raddr, taddr;
  logic [31:0] wdata, rdata;
  logic [15:0] twdata, trdata;
  logic [5:0] vl_in, vl_out;
  logic [31:0] all [32], bulk [32], shadow [32];
  logic [15:0] tshadow [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vreg_file dut (
    .clk, .rst_n, .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .raddr_i(raddr), .rdata_o(rdata),
    .twe_i(twe), .taddr_i(taddr), .twdata_i(twdata), .trdata_o(trdata),
    .vlwe_i(vlwe), .vl_i(vl_in), .vl_o(vl_out), .all_o(all), .bulk_we_i(bulk_we), .bulk_i(bulk));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; twe = 0; vlwe = 0; bulk_we = 0; waddr = 0; raddr = 0; taddr = 0;
    wdata = 0; twdata = 0; vl_in = 0;
    foreach (bulk[i]) bulk[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    foreach (all[i]) chk(all[i] == 0, "reset value");
    chk(vl_out == 0, "reset vl");
    // element writes
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1; waddr = 5'(i); wdata = $urandom; shadow[i] = wdata;
      twe = 1; taddr = 5'(i); twdata = 16'($urandom); tshadow[i] = twdata;
    end
    @(negedge clk);
    we = 0; twe = 0;
    vlwe = 1; vl_in = 6'd32;
    @(negedge clk);
    vlwe = 0;
    chk(vl_out == 6'd32, "vector length");
    for (int i = 0; i < 32; i++) begin
      raddr = 5'(i); taddr = 5'(i);
      #1;
      chk(rdata == shadow[i], $sformatf("element read %0d", i));
      chk(trdata == tshadow[i], $sformatf("type read %0d", i));
      chk(all[i] == shadow[i], $sformatf("full view %0d", i));
    end
    // bulk write
    @(negedge clk);
    foreach (bulk[i]) bulk[i] = ~shadow[i];
    bulk_we = 1;
    @(negedge clk);
    bulk_we = 0;
    foreach (all[i]) chk(all[i] == ~shadow[i], $sformatf("bulk write %0d", i));
    chk(vl_out == 6'd32, "vl kept over bulk write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
