// sort_core_run: drives one sort_core instance through a complete program of
// vector loads, SORT instructions of all three widths, an unassigned funct3,
// a non-SORT instruction and vector stores, acting as the surrounding
// in-order pipeline: it keeps an instruction in the execute stage while
// stall_o is high. Results are compared with a software lane sort; every
// SORT must take exactly STAGES cycles. Counts of the mechanisms exercised
// are exported for the enclosing testbench. Widths whose lanes are not built
// (HAS32/HAS16/HAS8 = 0) must be flagged illegal and leave the registers
// unchanged.
module sort_core_run #(
  parameter int unsigned STAGES = 1,
  parameter bit          FAST   = 1'b1,
  parameter bit          HAS32  = 1'b1,
  parameter bit          HAS16  = 1'b1,
  parameter bit          HAS8   = 1'b1
) (
  output int   checks,
  output int   failures,
  output int   n_sort [3],
  output int   n_stall_cycles,
  output int   n_illegal,
  output int   n_other,
  output logic finished
);
  logic clk = 1'b0, rst_n = 1'b0;
  logic instr_valid, stall, done, illegal;
  logic [31:0] instr;
  logic vwe, vtwe, vlwe;
  logic [4:0] vwaddr, vraddr, vtaddr;
  logic [31:0] vwdata, vrdata;
  logic [15:0] vtdata, vtrdata;
  logic [5:0] vl_in, vl_out;
  logic [31:0] model [32];

  always #5 clk = ~clk;

  sort_core #(.SORT_STAGES(STAGES), .FAST_CMP(FAST),
              .HAS_SORT32(HAS32), .HAS_SORT16(HAS16), .HAS_SORT8(HAS8)) dut (
    .clk, .rst_n, .instr_valid_i(instr_valid), .instr_i(instr), .stall_o(stall),
    .sort_done_o(done), .illegal_o(illegal),
    .vwe_i(vwe), .vwaddr_i(vwaddr), .vwdata_i(vwdata), .vraddr_i(vraddr), .vrdata_o(vrdata),
    .vtwe_i(vtwe), .vtaddr_i(vtaddr), .vtdata_i(vtdata), .vtdata_o(vtrdata),
    .vlwe_i(vlwe), .vl_i(vl_in), .vl_o(vl_out));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [stages=%0d] %s", STAGES, what);
    end
  endtask

  // expected result: every w-bit lane sorted, largest in register 0
  function automatic void ref_lanes(ref logic [31:0] v [32], input int w);
    for (int l = 0; l < 32 / w; l++) begin
      longint unsigned e [32];
      longint unsigned m = (64'd1 << w) - 1;
      for (int i = 0; i < 32; i++) e[i] = (longint'(v[i]) >> (l * w)) & m;
      for (int i = 1; i < 32; i++) begin
        longint unsigned key = e[i];
        int j = i - 1;
        while (j >= 0 && e[j] < key) begin e[j+1] = e[j]; j--; end
        e[j+1] = key;
      end
      for (int i = 0; i < 32; i++)
        v[i] = 32'((longint'(v[i]) & ~(m << (l * w))) | (e[i] << (l * w)));
    end
  endfunction

  task automatic load_all(int kind);
    for (int i = 0; i < 32; i++) begin
      vwe = 1; vwaddr = 5'(i);
      vwdata = (kind == 0) ? $urandom : ($urandom & 32'h0303_0303);
      model[i] = vwdata;
      @(negedge clk);
    end
    vwe = 0;
  endtask

  task automatic store_check(string what);
    for (int i = 0; i < 32; i++) begin
      vraddr = 5'(i);
      #1;
      chk(vrdata == model[i], $sformatf("%s: v%0d = %h, expected %h", what, i, vrdata, model[i]));
    end
  endtask

  // present one instruction in the execute stage until the pipeline may move
  task automatic execute(logic [31:0] ins, output int cycles);
    instr = ins; instr_valid = 1;
    cycles = 0;
    forever begin
      #1;
      cycles++;
      if (stall) n_stall_cycles++;
      if (illegal) n_illegal++;
      if (!stall) break;
      @(negedge clk);
    end
    @(negedge clk);
    instr_valid = 0;
    instr = '0;
  endtask

  function automatic logic [31:0] sort_instr(logic [2:0] f3);
    logic [31:0] r = $urandom;   // rd, rs1 and imm are don't-cares
    r[14:12] = f3;
    r[6:0]   = 7'b0001011;
    return r;
  endfunction

  initial begin
    int cyc, w;
    logic [31:0] saved [32];
    checks = 0; failures = 0; n_stall_cycles = 0; n_illegal = 0; n_other = 0;
    n_sort = '{0, 0, 0};
    finished = 0;
    instr_valid = 0; instr = '0; vwe = 0; vtwe = 0; vlwe = 0;
    vwaddr = 0; vraddr = 0; vtaddr = 0; vwdata = 0; vtdata = 0; vl_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // type and length registers
    vlwe = 1; vl_in = 6'd32; vtwe = 1; vtaddr = 5'd7; vtdata = 16'h0008;
    @(negedge clk);
    vlwe = 0; vtwe = 0;
    #1;
    chk(vl_out == 6'd32 && vtrdata == 16'h0008, "type/length registers");
    // SORTs of every width, random and repeated-value data
    for (int r = 0; r < 6; r++) begin
      for (int m = 0; m < 3; m++) begin
        w = (m == 0) ? 32 : (m == 1) ? 16 : 8;
        load_all(r % 2);
        if (!((m == 0) ? HAS32 : (m == 1) ? HAS16 : HAS8)) begin
          // width not built: flagged illegal, registers untouched
          int il_before;
          il_before = n_illegal;
          execute(sort_instr(3'(m)), cyc);
          chk(cyc == 1 && n_illegal == il_before + 1, $sformatf("SORT%0d without lanes", w));
          store_check($sformatf("SORT%0d without lanes", w));
          continue;
        end
        execute(sort_instr(3'(m)), cyc);
        n_sort[m]++;
        chk(cyc == int'(STAGES), $sformatf("SORT%0d took %0d cycles, expected %0d", w, cyc, STAGES));
        ref_lanes(model, w);
        store_check($sformatf("SORT%0d", w));
        // sorting sorted data again changes nothing
        execute(sort_instr(3'(m)), cyc);
        n_sort[m]++;
        store_check($sformatf("SORT%0d repeated", w));
      end
    end
    // unassigned funct3 and a non-SORT opcode leave the registers alone
    load_all(0);
    saved = model;
    execute(sort_instr(3'b111), cyc);
    chk(cyc == 1, "illegal SORT does not stall");
    execute(32'h0000_0013, cyc);   // addi x0, x0, 0
    n_other++;
    chk(cyc == 1, "other instruction does not stall");
    model = saved;
    store_check("after illegal / other");
    finished = 1;
  end

  // no element write may meet a sort write-back
  always @(posedge clk) if (rst_n && done && vwe) chk(1'b0, "load during SORT");
endmodule
