// tb_pc_alu: self-checking testbench for pc_alu.
//
// Drives the block with exhaustive or random inputs and compares its
// outputs with values derived independently from the instruction set
// (isa_ref_pkg) or from integer arithmetic.
`include "tb_check.svh"
module tb_pc_alu;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] pc, rel, ir, next_pc; logic execute; instr_t i;
  pc_alu dut (.pc, .rel, .ir, .execute, .next_pc);
  initial begin
    for (int n = 0; n < 20000; n++) begin
      pc = 8'($urandom); rel = 8'($urandom); execute = 1'($urandom);
      ir = (n % 4 == 0) ? 8'h80 : (n % 4 == 1) ? 8'h60 : 8'($urandom);
      i = classify(ir); #1;
      if (execute && (i inside {I_SJMP, I_JZ}))
        `CHECK(next_pc, 8'((int'(pc) + int'($signed(rel))) & 255), "pc+rel")
      else
        `CHECK(next_pc, 8'(pc + 1), "pc+1")
    end
    // SJMP STOP with REL = FE loops back onto itself: PC after the offset
    // byte is STOP+2, plus -2.
    pc = 8'd15; rel = 8'hFE; ir = 8'h80; execute = 1; #1;
    `CHECK(next_pc, 8'd13, "SJMP STOP")
    // NOP in Execute is never a jump.
    ir = 8'h00; #1;
    `CHECK(next_pc, 8'd16, "NOP increments")
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
