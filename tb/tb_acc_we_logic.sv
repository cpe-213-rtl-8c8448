// tb_acc_we_logic: self-checking testbench for acc_we_logic.
//
// Sweeps all 256 opcodes (and, where the block uses it, each cycle of the
// Fetch / Decode / Execute sequence and the zero flag) and compares the
// block's output with the value derived from the instruction-set classes
// in isa_ref_pkg.
`include "tb_check.svh"
module tb_acc_we_logic;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] ir; logic execute, acc_we; int n_on = 0;
  acc_we_logic dut (.execute, .ir, .acc_we);
  initial begin
    for (int op = 0; op < 256; op++)
      for (int e = 0; e < 2; e++) begin
        ir = 8'(op); execute = e[0]; #1;
        `CHECK(acc_we, execute && changes_a(classify(ir)), "acc_we")
        n_on += int'(acc_we);
      end
    // Opcodes that write A: MOV A,#D ADDC #D SUBB #D SWAP = 4, plus 6 Rn families x 8.
    `CHECK(n_on, 52, "number of ACC-writing opcodes")
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
