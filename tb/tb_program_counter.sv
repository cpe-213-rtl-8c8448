// tb_program_counter: self-checking testbench for program_counter.
//
// Checks reset to 0, that the PC holds while PC_WE is low and loads
// next_pc on the clock edge while it is high.
`include "tb_check.svh"
module tb_program_counter;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic pc_we = 0; logic [7:0] next_pc = 0, pc, exp;
  program_counter dut (.clk, .rst, .pc_we, .next_pc, .pc);
  initial begin
    @(posedge clk); #1;
    `CHECK(pc, 8'h00, "reset")
    rst <= 0; exp = 0;
    for (int n = 0; n < 500; n++) begin
      pc_we <= 1'($urandom); next_pc <= 8'($urandom);
      @(posedge clk); #1;
      if (pc_we) exp = next_pc;
      `CHECK(pc, exp, "pc")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // Watchdog: 100000 cycles
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
