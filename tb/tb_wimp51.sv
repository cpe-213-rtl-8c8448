// tb_wimp51: end-to-end testbench of the WIMP51 processor at its default size.
//
// Part 1 runs the six check programs of the instruction set (MOV/JZ/SJMP,
// logic operators, CLR/SETB, ADDC, SUBB, NOP) and checks the results their
// comments give (for example 5-5-1 = FF with the borrow set). Part 2 runs
// random programs that fill the whole 256-byte program memory, with jumps to
// instruction boundaries, and after every instruction compares A, CY,
// R0-R7 and the PC with the instruction-level model in isa_ref_pkg.
// Every instruction must take exactly three clock cycles: the state is
// compared every third cycle, at the start of the next Fetch cycle.
// Each mechanism of the design (two-byte fetch, SUBB, borrow, ADDC carry,
// taken and not-taken JZ, SJMP, NOP, register write, SWAP, CLR/SETB, logic
// operations, undefined opcodes) is counted and must occur at least once.
`include "tb_check.svh"
module tb_wimp51;
  import isa_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       load_we = 0;
  logic [7:0] load_addr = 0, load_data = 0;
  logic [7:0] acc, pc, ir;
  logic       carry;
  logic [1:0] phase;

  wimp51 dut (.clk, .rst, .load_we, .load_addr, .load_data, .acc, .carry, .pc, .ir, .phase);

  logic [7:0] mem [256];
  state_t     s;

  // Mechanism counters
  int n_two_byte, n_subb, n_borrow, n_add_carry, n_jz_taken, n_jz_not, n_sjmp,
      n_nop, n_reg_write, n_swap, n_clr_setb, n_logic, n_undef;

  task automatic load_and_reset();
    rst <= 1;
    for (int a = 0; a < 256; a++) begin
      load_we <= 1; load_addr <= 8'(a); load_data <= mem[a];
      @(posedge clk);
    end
    load_we <= 0;
    @(posedge clk);
    rst <= 0;
    s.a = 0; s.c = 0; s.pc = 0;
    for (int r = 0; r < 8; r++) s.r[r] = 0;
  endtask

  // Run one instruction on the RTL (three cycles) and on the model; compare.
  task automatic step_and_compare(string tag);
    instr_t i;
    logic [7:0] a0; logic c0;
    i  = classify(mem[s.pc]);
    a0 = s.a; c0 = s.c;
    `CHECK(phase, 2'd0, {tag, ": instruction starts in Fetch"})
    step(s, mem);
    // Mechanism statistics from the model
    if (has_operand_byte(i)) n_two_byte++;
    if (i inside {I_SUBB_IMM, I_SUBB_RN}) begin n_subb++; if (s.c) n_borrow++; end
    if (i inside {I_ADDC_IMM, I_ADDC_RN} && s.c) n_add_carry++;
    if (i == I_JZ) begin if (a0 == 0) n_jz_taken++; else n_jz_not++; end
    if (i == I_SJMP) n_sjmp++;
    if (i == I_NOP) n_nop++;
    if (i == I_MOV_RN_A) n_reg_write++;
    if (i == I_SWAP) n_swap++;
    if (i inside {I_CLR_C, I_SETB_C}) n_clr_setb++;
    if (i inside {I_ORL, I_ANL, I_XRL}) n_logic++;
    if (i == I_UNDEF) n_undef++;
    repeat (3) @(posedge clk);
    #1;
    `CHECK(acc, s.a, {tag, ": A"})
    `CHECK(carry, s.c, {tag, ": CY"})
    `CHECK(pc, s.pc, {tag, ": PC"})
    for (int r = 0; r < 8; r++) `CHECK(dut.u_regs.regs[r], s.r[r], {tag, ": Rn"})
  endtask

  task automatic run_sample(string tag, logic [7:0] prog[], int n_instr);
    for (int a = 0; a < 256; a++) mem[a] = 8'h00;
    foreach (prog[k]) mem[k] = prog[k];
    load_and_reset();
    @(negedge clk);
    for (int k = 0; k < n_instr; k++) step_and_compare(tag);
  endtask

  // Random program: instructions packed back to back over all 256 bytes,
  // jump offsets aimed at instruction starts.
  task automatic make_random_program();
    logic [7:0] starts[$];
    int         jumps[$];
    int         a = 0, sel;
    logic [7:0] op;
    while (a < 256) begin
      sel = $urandom_range(0, 99);
      if (sel < 6)       op = 8'h74;                         // MOV A,#D
      else if (sel < 14) op = 8'h34;                         // ADDC A,#D
      else if (sel < 22) op = 8'h94;                         // SUBB A,#D
      else if (sel < 30) op = 8'hF8 | 8'($urandom_range(0, 7));  // MOV Rn,A
      else if (sel < 36) op = 8'hE8 | 8'($urandom_range(0, 7));  // MOV A,Rn
      else if (sel < 44) op = 8'h38 | 8'($urandom_range(0, 7));  // ADDC A,Rn
      else if (sel < 52) op = 8'h98 | 8'($urandom_range(0, 7));  // SUBB A,Rn
      else if (sel < 56) op = 8'h48 | 8'($urandom_range(0, 7));  // ORL
      else if (sel < 60) op = 8'h58 | 8'($urandom_range(0, 7));  // ANL
      else if (sel < 64) op = 8'h68 | 8'($urandom_range(0, 7));  // XRL
      else if (sel < 68) op = 8'hC4;                         // SWAP
      else if (sel < 72) op = 8'hC3;                         // CLR C
      else if (sel < 76) op = 8'hD3;                         // SETB C
      else if (sel < 80) op = 8'h80;                         // SJMP
      else if (sel < 90) op = 8'h60;                         // JZ
      else if (sel < 94) op = 8'h00;                         // NOP
      else if (sel < 96) op = 8'hA5;                         // undefined
      else               op = 8'h74;
      if (has_operand_byte(classify(op)) && a == 255) op = 8'h00;
      starts.push_back(8'(a));
      mem[a] = op;
      if (has_operand_byte(classify(op))) begin
        mem[a+1] = 8'($urandom);
        if (op == 8'h80 || op == 8'h60) jumps.push_back(a);
        a += 2;
      end else a += 1;
    end
    // Jump to an instruction start: REL = target - (address after the jump)
    foreach (jumps[k]) mem[jumps[k] + 1] = 8'(int'(starts[$urandom_range(0, starts.size() - 1)]) - (jumps[k] + 2));
  endtask

  initial begin
    // --- Check programs of the instruction set ---
    // MOV, JZ, SJMP: the second JZ must skip "MOV A,R0", so A ends 0.
    run_sample("mov_jz_sjmp", '{8'h74,8'h01,8'h60,8'h09,8'hF8,8'h74,8'h05,8'hE8,
                                8'h74,8'h00,8'h60,8'h01,8'hE8,8'h80,8'hFE}, 10);
    `CHECK(acc, 8'h00, "mov_jz_sjmp A")
    `CHECK(dut.u_regs.regs[0], 8'h01, "mov_jz_sjmp R0")
    `CHECK(pc, 8'd13, "mov_jz_sjmp STOP")
    // Logic operators: A = EF at the end, R1 = FF.
    run_sample("logic", '{8'h74,8'hFF,8'hF9,8'h74,8'h01,8'h59,8'h49,8'h74,8'h01,
                          8'h69,8'hC4,8'h80,8'hFE}, 11);
    `CHECK(acc, 8'hEF, "logic A")
    `CHECK(dut.u_regs.regs[1], 8'hFF, "logic R1")
    `CHECK(pc, 8'd11, "logic STOP")
    // CLR/SETB: carry light on, then off.
    run_sample("clr_setb", '{8'hD3,8'hC3,8'h80,8'hFE}, 1);
    `CHECK(carry, 1'b1, "SETB C")
    step_and_compare("clr_setb");
    `CHECK(carry, 1'b0, "CLR C")
    // ADDC: 2+1+0 = 3, 3+1+3 = 7.
    run_sample("addc", '{8'h74,8'h02,8'hC3,8'h34,8'h01,8'hF8,8'hD3,8'h38,8'h80,8'hFE}, 8);
    `CHECK(acc, 8'h07, "addc A")
    `CHECK(dut.u_regs.regs[0], 8'h03, "addc R0")
    `CHECK(pc, 8'd8, "addc STOP")
    // SUBB: 6-1-0 = 5, 5-5-1 = FF with borrow.
    run_sample("subb", '{8'h74,8'h06,8'hC3,8'h94,8'h01,8'hF8,8'hD3,8'h98,8'h80,8'hFE}, 8);
    `CHECK(acc, 8'hFF, "subb A")
    `CHECK(carry, 1'b1, "subb borrow")
    `CHECK(dut.u_regs.regs[0], 8'h05, "subb R0")
    `CHECK(pc, 8'd8, "subb STOP")
    // NOP with A /= 0 and with A = 0: the PC steps by one each time.
    run_sample("nop", '{8'h74,8'h01,8'h00,8'h74,8'h00,8'h00,8'h80,8'hFE}, 3);
    `CHECK(pc, 8'd5, "NOP with A/=0")
    step_and_compare("nop");
    `CHECK(pc, 8'd6, "NOP with A=0")
    `CHECK(acc, 8'h00, "nop A")

    // --- Random programs against the instruction-level model ---
    for (int p = 0; p < 30; p++) begin
      make_random_program();
      load_and_reset();
      @(negedge clk);
      for (int k = 0; k < 400; k++) step_and_compare("random");
    end

    // --- Every mechanism must have occurred ---
    `CHECK(n_two_byte  > 0, 1'b1, "two-byte instruction seen")
    `CHECK(n_subb      > 0, 1'b1, "SUBB seen")
    `CHECK(n_borrow    > 0, 1'b1, "borrow seen")
    `CHECK(n_add_carry > 0, 1'b1, "ADDC carry seen")
    `CHECK(n_jz_taken  > 0, 1'b1, "JZ taken seen")
    `CHECK(n_jz_not    > 0, 1'b1, "JZ not taken seen")
    `CHECK(n_sjmp      > 0, 1'b1, "SJMP seen")
    `CHECK(n_nop       > 0, 1'b1, "NOP seen")
    `CHECK(n_reg_write > 0, 1'b1, "MOV Rn,A seen")
    `CHECK(n_swap      > 0, 1'b1, "SWAP seen")
    `CHECK(n_clr_setb  > 0, 1'b1, "CLR/SETB seen")
    `CHECK(n_logic     > 0, 1'b1, "logic op seen")
    `CHECK(n_undef     > 0, 1'b1, "undefined opcode seen")
    $display("mechanisms: two_byte=%0d subb=%0d borrow=%0d add_carry=%0d jz_taken=%0d jz_not=%0d sjmp=%0d nop=%0d reg_write=%0d swap=%0d clr_setb=%0d logic=%0d undef=%0d",
             n_two_byte, n_subb, n_borrow, n_add_carry, n_jz_taken, n_jz_not, n_sjmp,
             n_nop, n_reg_write, n_swap, n_clr_setb, n_logic, n_undef);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 200000 cycles
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
