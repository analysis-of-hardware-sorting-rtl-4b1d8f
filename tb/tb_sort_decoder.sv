// tb_sort_decoder: drives every funct3 value with the SORT opcode and with
// other opcodes, with random don't-care fields, and checks is_sort, the
// width selected and the illegal flag.
module tb_sort_decoder;
  import sort_pkg::*;
  logic [31:0] instr;
  logic is_sort, illegal;
  sort_mode_e mode;
  int checks = 0, failures = 0;

  sort_decoder dut (.instr_i(instr), .is_sort_o(is_sort), .mode_o(mode), .illegal_o(illegal));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      for (int f = 0; f < 8; f++) begin
        logic [6:0] opc;
        logic exp_sort, exp_ill;
        sort_mode_e exp_mode;
        opc = (n % 2 == 0) ? 7'b0001011 : 7'($urandom);
        instr = $urandom;
        instr[14:12] = 3'(f);
        instr[6:0]   = opc;
        exp_sort = (opc == 7'b0001011);
        exp_ill  = exp_sort && (f > 2);
        exp_mode = (f == 1) ? MODE_16 : (f == 2) ? MODE_8 : MODE_32;
        #1;
        checks++;
        if (is_sort !== exp_sort || illegal !== exp_ill ||
            (exp_sort && !exp_ill && mode !== exp_mode)) begin
          failures++;
          $display("FAIL instr=%h is_sort=%b illegal=%b mode=%0d", instr, is_sort, illegal, mode);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
