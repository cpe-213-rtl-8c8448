// tb_carry_flag: self-checking testbench for carry_flag.
//
// Checks CLR C (C3) -> 0, SETB C (D3) -> 1, ALU carry for every other
// opcode, and that the flag holds while its write enable is low.
`include "tb_check.svh"
module tb_carry_flag;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic c_we = 0, carry_f = 0, cy, exp; logic [7:0] ir = 0;
  carry_flag dut (.clk, .rst, .c_we, .ir, .carry_f, .cy);
  initial begin
    @(posedge clk); #1;
    `CHECK(cy, 1'b0, "reset")
    rst <= 0; exp = 0;
    for (int n = 0; n < 2000; n++) begin
      c_we <= 1'($urandom); carry_f <= 1'($urandom);
      ir <= (n % 4 == 0) ? 8'hC3 : (n % 4 == 1) ? 8'hD3 : 8'($urandom);
      @(posedge clk); #1;
      if (c_we) exp = (classify(ir) == I_CLR_C) ? 1'b0 : (classify(ir) == I_SETB_C) ? 1'b1 : carry_f;
      `CHECK(cy, exp, "cy")
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
