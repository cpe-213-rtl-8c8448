// tb_l_a_sel: self-checking testbench for l_a_sel.
//
// Sweeps all 256 opcodes (and, where the block uses it, each cycle of the
// Fetch / Decode / Execute sequence and the zero flag) and compares the
// block's output with the value derived from the instruction-set classes
// in isa_ref_pkg.
`include "tb_check.svh"
module tb_l_a_sel;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] ir; logic [1:0] l; instr_t i;
  l_a_sel dut (.ir_hi(ir[7:4]), .l);
  initial begin
    // Expected codes: 00 logic unit, 01 adder, 10 swap, 11 AUX pass.
    for (int op = 0; op < 256; op++) begin
      ir = 8'(op); i = classify(ir); #1;
      case (i)
        I_ORL, I_ANL, I_XRL:                         `CHECK(l, 2'b00, "L logic")
        I_ADDC_IMM, I_ADDC_RN, I_SUBB_IMM, I_SUBB_RN: `CHECK(l, 2'b01, "L adder")
        I_SWAP:                                      `CHECK(l, 2'b10, "L swap")
        I_MOV_A_IMM, I_MOV_A_RN:                     `CHECK(l, 2'b11, "L aux")
        default: ;
      endcase
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
