// tb_flisp_ldy_tests: the two LDY test programs run on the whole processor.
//
// Each test starts from reset with its own memory image and register values,
// as a processor simulator would be set up:
//   LDY absolute: M(20)=A1, M(21)=42, M(42)=96; Y=FF, PC=20  ->  Y = 96
//   LDY 4,X:      M(20)=C1, M(21)=04, M(46)=74; X=42, Y=FF, PC=20  ->  Y = 74
// Register values are set in manual mode (memory word -> register), then
// the processor runs in automatic mode from fetch until the instruction ends.
// Checked: Y, flags (N from bit 7, Z clear, V cleared, C unchanged), PC = 22,
// the address the operand was read from, and the clock count from fetch to
// the next fetch (5 cycles).
module tb_flisp_ldy_tests;
  import flisp_pkg::*;

  logic clk = 0, rst, manual, load_we;
  ctrl_t manual_ctrl, c;
  logic [7:0] load_addr, load_data;
  logic [7:0] reg_a, reg_x, reg_y, reg_sp, reg_pc, reg_i, data_bus, addr_bus;
  logic [3:0] reg_cc, state;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  flisp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic poke(logic [7:0] a, logic [7:0] d);
    load_we = 1; load_addr = a; load_data = d;
    @(posedge clk); #1;
    load_we = 0;
  endtask

  // manual: M(PC) -> register chosen by the caller's control word, PC+1 -> PC
  task automatic set_reg(ctrl_t which);
    which.mr = 1; which.inc_pc = 1;
    manual_ctrl = which;
    @(posedge clk); #1;
    manual_ctrl = CTRL_IDLE;
  endtask

  // One test: memory words at 00.. hold the register values in the order
  // X, Y, C-flag image, PC (PC last, loaded without increment).
  task automatic run_test(string name, logic [7:0] op, logic [7:0] arg,
                          logic [7:0] opnd_addr, logic [7:0] opnd,
                          logic [7:0] x_val, logic [3:0] cc_val);
    int cycles;
    logic [7:0] seen_addr;
    rst = 1; manual = 1; manual_ctrl = CTRL_IDLE;
    @(posedge clk); #1;
    poke(8'h00, x_val); poke(8'h01, 8'hFF); poke(8'h02, {4'h0, cc_val});
    poke(8'h03, 8'h20);
    poke(8'h20, op); poke(8'h21, arg); poke(opnd_addr, opnd);
    rst = 0;
    c = CTRL_IDLE; c.ld_x = 1; set_reg(c);
    c = CTRL_IDLE; c.ld_y = 1; set_reg(c);
    c = CTRL_IDLE; c.ld_cc = 1; c.g[9:2] = 8'b01010101; set_reg(c);
    manual_ctrl = CTRL_IDLE; manual_ctrl.mr = 1; manual_ctrl.ld_pc = 1;
    @(posedge clk); #1;
    manual_ctrl = CTRL_IDLE;
    check(reg_pc == 8'h20 && reg_y == 8'hFF && reg_x == x_val, {name, ": set-up"});
    // the reset step Q0 reloads PC from M(FF); FF holds 20 so PC stays 20
    poke(8'hFF, 8'h20);
    manual = 0;
    @(negedge clk);                       // Q0, reset step
    @(negedge clk);                       // Q1, fetch begins
    check(state == 1, {name, ": fetch begins"});
    cycles = 0; seen_addr = 8'h00;
    do begin
      if (ctrl.ld_y) seen_addr = addr_bus;
      @(negedge clk);
      cycles++;
    end while (state != 1 && cycles < 20);
    check(cycles == 5, $sformatf("%s: %0d cycles, expected 5", name, cycles));
    check(seen_addr == opnd_addr, $sformatf("%s: operand read at %h, expected %h",
                                            name, seen_addr, opnd_addr));
    check(reg_y == opnd, $sformatf("%s: Y=%h expected %h", name, reg_y, opnd));
    check(reg_pc == 8'h22, $sformatf("%s: PC=%h expected 22", name, reg_pc));
    check(reg_cc == {opnd[7], opnd == 8'h00, 1'b0, cc_val[0]},
          $sformatf("%s: CC=%b", name, reg_cc));
  endtask

  initial begin
    load_we = 0; load_addr = 0; load_data = 0;
    run_test("LDY Adr", OP_LDY_ABS, 8'h42, 8'h42, 8'h96, 8'h00, 4'b0011);
    run_test("LDY 4,X", OP_LDY_NX,  8'h04, 8'h46, 8'h74, 8'h42, 4'b0010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
