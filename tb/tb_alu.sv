// tb_alu: self-checking testbench for alu.
//
// Drives the block with exhaustive or random inputs and compares its
// outputs with values derived independently from the instruction set
// (isa_ref_pkg) or from integer arithmetic.
`include "tb_check.svh"
module tb_alu;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, b, ir, result; logic cy, carry_f; instr_t i; int t; logic [7:0] exp;
  alu dut (.a, .b, .cy, .ir_hi(ir[7:4]), .result, .carry_f);
  initial begin
    for (int n = 0; n < 40000; n++) begin
      ir = 8'($urandom); a = 8'($urandom); b = 8'($urandom); cy = 1'($urandom);
      i = classify(ir); #1;
      case (i)
        I_MOV_A_IMM, I_MOV_A_RN: exp = b;
        I_ORL:  exp = a | b;
        I_ANL:  exp = a & b;
        I_XRL:  exp = a ^ b;
        I_SWAP: exp = {a[3:0], a[7:4]};
        I_ADDC_IMM, I_ADDC_RN: begin
          t = int'(a) + int'(b) + int'(cy); exp = t[7:0];
          `CHECK(carry_f, t[8], "addc carry")
        end
        I_SUBB_IMM, I_SUBB_RN: begin
          t = int'(a) - int'(b) - int'(cy); exp = t[7:0];
          `CHECK(carry_f, t < 0, "subb borrow")
        end
        default: exp = result;  // result unused for these opcodes
      endcase
      `CHECK(result, exp, "alu result")
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
