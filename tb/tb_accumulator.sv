// tb_accumulator: self-checking testbench for accumulator.
//
// Checks loading under ACC_WE, holding otherwise, and the zero flag,
// including values with a single bit set.
`include "tb_check.svh"
module tb_accumulator;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic acc_we = 0; logic [7:0] din, acc, exp; logic zero;
  accumulator dut (.clk, .rst, .acc_we, .din, .acc, .zero);
  initial begin
    @(posedge clk); #1;
    `CHECK(acc, 8'h00, "reset")
    `CHECK(zero, 1'b1, "zero after reset")
    rst <= 0; exp = 0;
    for (int n = 0; n < 1000; n++) begin
      acc_we <= 1'($urandom);
      din <= (n % 4 == 0) ? 8'h00 : (n % 4 == 1) ? 8'(1 << (n % 8)) : 8'($urandom);
      @(posedge clk); #1;
      if (acc_we) exp = din;
      `CHECK(acc, exp, "acc")
      `CHECK(zero, exp == 0, "zero")
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
