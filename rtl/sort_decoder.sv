// sort_decoder: recognises the SORT instruction.
//
// SORT is an I-type instruction with its own opcode; funct3 selects the
// element width (32, 16 or 8 bits, i.e. one, two or four parallel sorting
// lanes). rd, rs1 and the immediate are ignored: the instruction reads and
// writes the whole vector register file. is_sort_o flags the opcode,
// illegal_o flags the opcode with an unassigned funct3, and mode_o is
// meaningful only when is_sort_o is high and illegal_o low. Combinational.
//
// One opcode with a funct3 per width follows the design; the opcode and
// funct3 values (sort_pkg) are this implementation's.
module sort_decoder
  import sort_pkg::*;
(
  input  logic [31:0] instr_i,
  output logic        is_sort_o,
  output sort_mode_e  mode_o,
  output logic        illegal_o
);
  itype_t ins;

  always_comb begin
    ins       = itype_t'(instr_i);
    is_sort_o = (ins.opcode == OPC_SORT);
    mode_o    = MODE_32;
    illegal_o = 1'b0;
    case (ins.funct3)
      F3_SORT32: mode_o = MODE_32;
      F3_SORT16: mode_o = MODE_16;
      F3_SORT8:  mode_o = MODE_8;
      default:   illegal_o = is_sort_o;
    endcase
  end
endmodule
