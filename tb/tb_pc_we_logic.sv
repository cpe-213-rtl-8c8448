// tb_pc_we_logic: self-checking testbench for pc_we_logic.
//
// Sweeps all 256 opcodes (and, where the block uses it, each cycle of the
// Fetch / Decode / Execute sequence and the zero flag) and compares the
// block's output with the value derived from the instruction-set classes
// in isa_ref_pkg.
`include "tb_check.svh"
module tb_pc_we_logic;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] ir; logic fetch, decode, execute, two_byte, zero, pc_we; instr_t i; logic exp;
  pc_we_logic dut (.fetch, .decode, .execute, .ir, .two_byte, .zero, .pc_we);
  initial begin
    for (int op = 0; op < 256; op++)
      for (int ph = 0; ph < 3; ph++)
        for (int z = 0; z < 2; z++) begin
          ir = 8'(op); i = classify(ir);
          fetch = (ph == 0); decode = (ph == 1); execute = (ph == 2);
          two_byte = has_operand_byte(i); zero = z[0]; #1;
          case (ph)
            0: exp = 1;
            1: exp = has_operand_byte(i);
            default: exp = (i == I_SJMP) || (i == I_JZ && zero);
          endcase
          `CHECK(pc_we, exp, "pc_we")
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // Watchdog
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
