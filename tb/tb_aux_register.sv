// tb_aux_register: self-checking testbench for aux_register.
//
// Checks that AUX loads the register-bank value when REG_IN is high, the
// program byte when it is low, and holds while AUX_WE is low.
`include "tb_check.svh"
module tb_aux_register;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic aux_we = 0, reg_in = 0; logic [7:0] reg_data, mem_data, aux, exp;
  aux_register dut (.clk, .rst, .aux_we, .reg_in, .reg_data, .mem_data, .aux);
  initial begin
    @(posedge clk); #1;
    `CHECK(aux, 8'h00, "reset")
    rst <= 0; exp = 0;
    for (int n = 0; n < 1000; n++) begin
      aux_we <= 1'($urandom); reg_in <= 1'($urandom);
      reg_data <= 8'($urandom); mem_data <= 8'($urandom);
      @(posedge clk); #1;
      if (aux_we) exp = reg_in ? reg_data : mem_data;
      `CHECK(aux, exp, "aux")
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
