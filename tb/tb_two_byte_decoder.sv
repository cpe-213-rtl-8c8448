// tb_two_byte_decoder: self-checking testbench for two_byte_decoder.
//
// Sweeps all 256 opcodes (and, where the block uses it, each cycle of the
// Fetch / Decode / Execute sequence and the zero flag) and compares the
// block's output with the value derived from the instruction-set classes
// in isa_ref_pkg.
`include "tb_check.svh"
module tb_two_byte_decoder;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] ir; logic two_byte;
  two_byte_decoder dut (.ir, .two_byte);
  initial begin
    for (int op = 0; op < 256; op++) begin
      ir = 8'(op); #1;
      `CHECK(two_byte, has_operand_byte(classify(ir)), "two_byte")
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
