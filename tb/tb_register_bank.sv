// tb_register_bank: self-checking testbench for register_bank.
//
// Checks reset of R0-R7, writes to random registers and the asynchronous
// read of every register against a model array.
`include "tb_check.svh"
module tb_register_bank;
  import isa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [2:0] raddr, waddr; logic [7:0] rdata, wdata; logic we = 0;
  logic [7:0] model [8];
  register_bank dut (.clk, .rst, .raddr, .rdata, .we, .waddr, .wdata);
  initial begin
    @(posedge clk); #1;
    rst <= 0;
    for (int r = 0; r < 8; r++) begin
      model[r] = 0; raddr = 3'(r); #1;
      `CHECK(rdata, 8'h00, "reset")
    end
    for (int n = 0; n < 1000; n++) begin
      we <= 1'($urandom); waddr <= 3'($urandom); wdata <= 8'($urandom);
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      raddr = 3'($urandom); #1;
      `CHECK(rdata, model[raddr], "read")
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
