// tb_aux_we_logic: self-checking testbench for aux_we_logic.
//
// Sweeps all 256 opcodes (and, where the block uses it, each cycle of the
// Fetch / Decode / Execute sequence and the zero flag) and compares the
// block's output with the value derived from the instruction-set classes
// in isa_ref_pkg.
`include "tb_check.svh"
module tb_aux_we_logic;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] ir; logic decode, aux_we;
  aux_we_logic dut (.decode, .ir, .aux_we);
  initial begin
    for (int op = 0; op < 256; op++)
      for (int d = 0; d < 2; d++) begin
        ir = 8'(op); decode = d[0]; #1;
        `CHECK(aux_we, decode && !(classify(ir) inside {I_SETB_C, I_CLR_C, I_SWAP}), "aux_we")
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
