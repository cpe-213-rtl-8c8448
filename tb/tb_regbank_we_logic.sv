// tb_regbank_we_logic: self-checking testbench for regbank_we_logic.
//
// Sweeps all 256 opcodes (and, where the block uses it, each cycle of the
// Fetch / Decode / Execute sequence and the zero flag) and compares the
// block's output with the value derived from the instruction-set classes
// in isa_ref_pkg.
`include "tb_check.svh"
module tb_regbank_we_logic;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] ir; logic execute, reg_we;
  regbank_we_logic dut (.execute, .ir_hi(ir[7:3]), .reg_we);
  initial begin
    for (int op = 0; op < 256; op++)
      for (int e = 0; e < 2; e++) begin
        ir = 8'(op); execute = e[0]; #1;
        `CHECK(reg_we, execute && classify(ir) == I_MOV_RN_A, "reg_we")
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
