// tb_reg_in_logic: self-checking testbench for reg_in_logic.
//
// Sweeps all 256 opcodes (and, where the block uses it, each cycle of the
// Fetch / Decode / Execute sequence and the zero flag) and compares the
// block's output with the value derived from the instruction-set classes
// in isa_ref_pkg.
`include "tb_check.svh"
module tb_reg_in_logic;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] ir; logic reg_in;
  reg_in_logic dut (.ir_hi(ir[7:3]), .reg_in);
  initial begin
    for (int op = 0; op < 256; op++) begin
      ir = 8'(op); #1;
      `CHECK(reg_in, uses_rn(classify(ir)), "reg_in")
      // For every defined opcode REG_IN equals IR3.
      if (classify(ir) != I_UNDEF) `CHECK(reg_in, ir[3], "reg_in == IR3")
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
