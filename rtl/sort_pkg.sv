// sort_pkg: types and constants shared by the hardware sorting datapath.
//
// The SORT instruction is a single custom I-type instruction (the standard
// RISC-V field layout: imm[31:20], rs1[19:15], funct3[14:12], rd[11:7],
// opcode[6:0]). Its funct3 field selects the element width; rd, rs1 and the
// immediate are don't-cares because the instruction reads and writes the
// whole vector register file. One opcode and a funct3 per width is the
// scheme of the design; the concrete opcode (custom-0) and funct3 codes are
// this implementation's choice.
package sort_pkg;

  localparam int unsigned XLEN = 32;  // vector register width
  localparam int unsigned NREG = 32;  // vector registers = elements per sort

  localparam logic [6:0] OPC_SORT = 7'b000_1011;  // RISC-V custom-0

  typedef enum logic [2:0] {
    F3_SORT32 = 3'b000,   // one lane of 32-bit elements
    F3_SORT16 = 3'b001,   // two lanes of 16-bit elements
    F3_SORT8  = 3'b010    // four lanes of 8-bit elements
  } sort_f3_e;

  typedef enum logic [1:0] {
    MODE_32 = 2'd0,
    MODE_16 = 2'd1,
    MODE_8  = 2'd2
  } sort_mode_e;

  // I-type view of an instruction word
  typedef struct packed {
    logic [11:0] imm;
    logic [4:0]  rs1;
    logic [2:0]  funct3;
    logic [4:0]  rd;
    logic [6:0]  opcode;
  } itype_t;

  typedef logic [XLEN-1:0] vreg_t;

endpackage
