// sort_core: hardware sorting in the execute stage of an in-order RISC-V core.
//
// A single SORT instruction sorts the whole vector register file. The 32
// vector registers supply 32 elements per lane: one lane of 32-bit elements,
// two lanes of 16-bit elements (bits 31:16 and 15:0) or four lanes of 8-bit
// elements, chosen by the instruction's funct3. Every lane is ordered by a
// 32-element sorting network built from two-element compare-and-swap units,
// and the result is written back over the registers in the bit positions it
// came from (register 0 gets the largest element of each lane).
//
// Contents: sort_decoder (instruction), vreg_file (vector registers with an
// element port for the load/store path and a full-width port for the
// sorter), three sort_lanes instances (32/16/8-bit), and sort_hazard, which
// holds the pipeline while a multi-cycle sort is in flight.
//
// FAST_CMP = 1 replaces every lane's basic comparator by the look-ahead fast
// comparator (fast_cmp); the default is the basic comparator, which the
// design found just as fast at 8 bits and far smaller at every width.
//
// HAS_SORT32/16/8 choose which lane sets are built. The design evaluated one
// width per system (HAS_SORT8 alone gives its four-lane 8-bit system); the
// default builds all three. A SORT for a width that is not built raises
// illegal_o and does nothing.
//
// Interface and timing: the surrounding processor presents the instruction in
// the execute stage on instr_valid_i/instr_i and keeps it there while stall_o
// is high. With SORT_STAGES = 1 (the unpipelined sorting unit) a SORT
// completes in the cycle it arrives: sort_done_o is high and the registers
// hold the sorted data after that clock edge. With SORT_STAGES = S > 1 (the
// pipelined unit, 28 in the design) stall_o is high for S-1 cycles and
// sort_done_o in the S-th. A SORT with an unassigned funct3 raises illegal_o
// and does nothing. Vector loads write through vwe_i/vwaddr_i/vwdata_i,
// vector stores read vraddr_i/vrdata_o; the type and vector-length registers
// have their own ports. Reset (rst_n, active low, asynchronous) clears all
// registers.
//
// The lane arrangement, the sorting network, the fast comparator option, the
// single instruction with funct3-selected width and the stall-until-done
// handling of the pipelined unit follow the design. Carrying all three widths
// in one core (each evaluated system of the design carries one), the opcode,
// the funct3 codes, unsigned elements and the port set are this
// implementation's choices.
module sort_core
  import sort_pkg::*;
#(
  parameter int unsigned SORT_STAGES = 1,
  parameter bit          FAST_CMP    = 1'b0,
  parameter bit          HAS_SORT32  = 1'b1,
  parameter bit          HAS_SORT16  = 1'b1,
  parameter bit          HAS_SORT8   = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction in the execute stage
  input  logic        instr_valid_i,
  input  logic [31:0] instr_i,
  output logic        stall_o,
  output logic        sort_done_o,
  output logic        illegal_o,
  // vector register element port (vector loads / stores)
  input  logic        vwe_i,
  input  logic [4:0]  vwaddr_i,
  input  logic [31:0] vwdata_i,
  input  logic [4:0]  vraddr_i,
  output logic [31:0] vrdata_o,
  // vector type and length registers
  input  logic        vtwe_i,
  input  logic [4:0]  vtaddr_i,
  input  logic [15:0] vtdata_i,
  output logic [15:0] vtdata_o,
  input  logic        vlwe_i,
  input  logic [5:0]  vl_i,
  output logic [5:0]  vl_o
);
  logic       is_sort, dec_illegal, mode_ok, req, start, done;
  sort_mode_e mode;

  sort_decoder u_dec (
    .instr_i  (instr_i),
    .is_sort_o(is_sort),
    .mode_o   (mode),
    .illegal_o(dec_illegal)
  );

  // a width whose lanes are not built is treated like an unassigned funct3
  always_comb begin
    case (mode)
      MODE_16: mode_ok = HAS_SORT16;
      MODE_8:  mode_ok = HAS_SORT8;
      default: mode_ok = HAS_SORT32;
    endcase
  end

  assign req       = instr_valid_i && is_sort && !dec_illegal && mode_ok;
  assign illegal_o = instr_valid_i && is_sort && (dec_illegal || !mode_ok);

  sort_hazard #(.STAGES(SORT_STAGES)) u_hz (
    .clk, .rst_n, .req_i(req), .start_o(start), .stall_o(stall_o), .done_o(done)
  );
  assign sort_done_o = done;

  vreg_t vall [NREG];
  vreg_t res32 [NREG], res16 [NREG], res8 [NREG], result [NREG];
  logic  v32, v16, v8;

  if (HAS_SORT32) begin : g_l32
    sort_lanes #(.ELEM_W(32), .NELEM(NREG), .FAST_CMP(FAST_CMP), .STAGES(SORT_STAGES)) u_l32 (
      .clk, .rst_n, .valid_i(start && mode == MODE_32), .vin_i(vall), .valid_o(v32), .vout_o(res32)
    );
  end else begin : g_no32
    assign v32 = 1'b0;
    always_comb for (int i = 0; i < NREG; i++) res32[i] = '0;
  end
  if (HAS_SORT16) begin : g_l16
    sort_lanes #(.ELEM_W(16), .NELEM(NREG), .FAST_CMP(FAST_CMP), .STAGES(SORT_STAGES)) u_l16 (
      .clk, .rst_n, .valid_i(start && mode == MODE_16), .vin_i(vall), .valid_o(v16), .vout_o(res16)
    );
  end else begin : g_no16
    assign v16 = 1'b0;
    always_comb for (int i = 0; i < NREG; i++) res16[i] = '0;
  end
  if (HAS_SORT8) begin : g_l8
    sort_lanes #(.ELEM_W(8), .NELEM(NREG), .FAST_CMP(FAST_CMP), .STAGES(SORT_STAGES)) u_l8 (
      .clk, .rst_n, .valid_i(start && mode == MODE_8), .vin_i(vall), .valid_o(v8), .vout_o(res8)
    );
  end else begin : g_no8
    assign v8 = 1'b0;
    always_comb for (int i = 0; i < NREG; i++) res8[i] = '0;
  end

  always_comb begin
    case (mode)
      MODE_16: result = res16;
      MODE_8:  result = res8;
      default: result = res32;
    endcase
  end

  vreg_file #(.NREG(NREG), .XLEN(XLEN), .TYPE_W(16), .VL_W(6)) u_vrf (
    .clk, .rst_n,
    .we_i     (vwe_i),
    .waddr_i  (vwaddr_i),
    .wdata_i  (vwdata_i),
    .raddr_i  (vraddr_i),
    .rdata_o  (vrdata_o),
    .twe_i    (vtwe_i),
    .taddr_i  (vtaddr_i),
    .twdata_i (vtdata_i),
    .trdata_o (vtdata_o),
    .vlwe_i   (vlwe_i),
    .vl_i     (vl_i),
    .vl_o     (vl_o),
    .all_o    (vall),
    .bulk_we_i(done),
    .bulk_i   (result)
  );

  // the lane selected by the instruction delivers its result exactly when
  // the hazard logic ends the instruction
  a_lane_timing: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> ((mode == MODE_32) ? v32 : (mode == MODE_16) ? v16 : v8))
    else $error("sort_core: sort result not valid at write-back");
endmodule
