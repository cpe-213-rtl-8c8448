// tb_instruction_register: self-checking testbench for instruction_register.
//
// Checks reset to NOP, loading in the Fetch cycle and holding otherwise.
`include "tb_check.svh"
module tb_instruction_register;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic load = 0; logic [7:0] din = 8'hFF, ir, exp;
  instruction_register dut (.clk, .rst, .load, .din, .ir);
  initial begin
    @(posedge clk); #1;
    `CHECK(ir, 8'h00, "reset")
    rst <= 0; exp = 0;
    for (int n = 0; n < 500; n++) begin
      load <= (n % 3 == 0); din <= 8'($urandom);
      @(posedge clk); #1;
      if (load) exp = din;
      `CHECK(ir, exp, "ir")
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
