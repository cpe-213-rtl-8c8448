// tb_subtract_enable: self-checking testbench for subtract_enable.
//
// Sweeps all 256 opcodes (and, where the block uses it, each cycle of the
// Fetch / Decode / Execute sequence and the zero flag) and compares the
// block's output with the value derived from the instruction-set classes
// in isa_ref_pkg.
`include "tb_check.svh"
module tb_subtract_enable;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] ir; logic sub_en;
  subtract_enable dut (.ir_hi(ir[7:4]), .sub_en);
  initial begin
    for (int op = 0; op < 256; op++) begin
      ir = 8'(op); #1;
      // Defined opcodes: high exactly for SUBB. Undefined: upper nibble 1001.
      if (classify(ir) != I_UNDEF)
        `CHECK(sub_en, classify(ir) inside {I_SUBB_IMM, I_SUBB_RN}, "sub_en")
      else
        `CHECK(sub_en, ir[7:4] == 4'h9, "sub_en undefined")
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
