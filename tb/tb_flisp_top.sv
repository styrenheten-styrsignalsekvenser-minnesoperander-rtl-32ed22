// tb_flisp_top: end-to-end test of the FLIS processor at its default size.
//
// Preparation: a program is written through the memory load port. In manual
// mode, control words set by hand load X = 42, Y = FF, SP = 80, CC = 0011
// (V and C set) and A = 5A from memory words 00..04. Back in automatic mode
// the reset step loads PC from address FF (20), and the program runs:
//   20  A1 42   LDY 42      Y = M(42) = 96   (worked example, absolute)
//   22  C1 04   LDY 4,X     Y = M(46) = 74   (worked example, X = 42)
//   24  91 00   LDY #00     Y = 00, Z set
//   26  B1 03   LDY 3,SP    Y = M(83) = F0, N set
//   28  D1 10   LDY 10,Y    Y = M(F0+10 wraps to 00) = 42
//   2A  05      CLRA        A = 00, flags 0100
//   2B  00      NOP
//   2C  91 7F   LDY #7F     Y = 7F, N and Z clear
// After each instruction Y, A, PC and CC are compared with values worked out
// by hand, and the clock cycles and memory reads it took are checked: three
// fetch/decode cycles plus its execute states, that PC points past the
// opcode when execution starts, and as many reads as the
// cycle column of the instruction table (2 for LDY #, 3 for the others).
// Finally, in manual mode, Y is stored with MW at X+T and read back into A.
// Mechanisms counted (each must occur): manual operation, reset step, the
// five address sources, V cleared while C is kept, CLRA, NOP, next fetch.
module tb_flisp_top;
  import flisp_pkg::*;

  logic clk = 0, rst, manual, load_we;
  ctrl_t manual_ctrl;
  logic [7:0] load_addr, load_data;
  logic [7:0] reg_a, reg_x, reg_y, reg_sp, reg_pc, reg_i, data_bus, addr_bus;
  logic [3:0] reg_cc, state;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_manual = 0, n_reset = 0, n_nf = 0, n_clra = 0, n_nop = 0;
  int n_asel [5];
  int n_vclr_ckeep = 0;

  flisp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
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

  // one manual control word applied for one clock
  task automatic manual_step(ctrl_t c);
    manual_ctrl = c;
    @(posedge clk); #1;
    manual_ctrl = CTRL_IDLE;
  endtask

  // mechanism monitor, sampled between clock edges
  always @(negedge clk) if (!rst) begin
    if (manual) n_manual++;
    else begin
      if (state == 0) n_reset++;
      if (ctrl.nf) n_nf++;
      if (ctrl.mr) begin
        if (ctrl.g[14]) n_asel[4]++;
        else n_asel[int'(ctrl.g[13:12])]++;
      end
      if (ctrl.ld_cc && ctrl.g[5:4] == 2'b10 && ctrl.g[3:2] == 2'b11) n_vclr_ckeep++;
      if (state == 4 && reg_i == OP_CLRA) n_clra++;
      if (state == 4 && reg_i == OP_NOP) n_nop++;
    end
  end

  // run one instruction from Q1 to the next Q1, counting cycles and reads;
  // called and returning between clock edges
  task automatic run_one(logic [7:0] exp_op, int exp_cycles, int exp_reads,
                         logic [7:0] exp_y, logic [7:0] exp_a,
                         logic [7:0] exp_pc, logic [3:0] exp_cc);
    int cycles = 0, reads = 0;
    logic [7:0] pc_start = reg_pc;
    check(state == 1, $sformatf("instruction %h starts in Q1 (state %0d)", exp_op, state));
    do begin
      if (ctrl.mr) reads++;
      // before the execute phase PC already points past the opcode
      if (state == 4)
        check(reg_pc == pc_start + 8'd1,
              $sformatf("%h: PC=%h entering execute, expected %h", exp_op, reg_pc, pc_start + 8'd1));
      @(negedge clk);
      cycles++;
    end while (state != 1 && cycles < 20);
    check(reg_i == exp_op, $sformatf("opcode %h fetched (got %h)", exp_op, reg_i));
    check(cycles == exp_cycles, $sformatf("%h: %0d cycles, expected %0d", exp_op, cycles, exp_cycles));
    check(reads == exp_reads, $sformatf("%h: %0d reads, expected %0d", exp_op, reads, exp_reads));
    check(reg_y == exp_y, $sformatf("%h: Y=%h expected %h", exp_op, reg_y, exp_y));
    check(reg_a == exp_a, $sformatf("%h: A=%h expected %h", exp_op, reg_a, exp_a));
    check(reg_pc == exp_pc, $sformatf("%h: PC=%h expected %h", exp_op, reg_pc, exp_pc));
    check(reg_cc == exp_cc, $sformatf("%h: CC=%b expected %b", exp_op, reg_cc, exp_cc));
  endtask

  ctrl_t c;

  initial begin
    foreach (n_asel[i]) n_asel[i] = 0;
    rst = 1; manual = 1; manual_ctrl = CTRL_IDLE;
    load_we = 0; load_addr = 0; load_data = 0;
    @(posedge clk); #1;
    // memory image
    poke(8'h00, 8'h42); poke(8'h01, 8'hFF); poke(8'h02, 8'h80);
    poke(8'h03, 8'h03); poke(8'h04, 8'h5A);
    poke(8'h20, 8'hA1); poke(8'h21, 8'h42);
    poke(8'h22, 8'hC1); poke(8'h23, 8'h04);
    poke(8'h24, 8'h91); poke(8'h25, 8'h00);
    poke(8'h26, 8'hB1); poke(8'h27, 8'h03);
    poke(8'h28, 8'hD1); poke(8'h29, 8'h10);
    poke(8'h2A, 8'h05); poke(8'h2B, 8'h00);
    poke(8'h2C, 8'h91); poke(8'h2D, 8'h7F);
    poke(8'h42, 8'h96); poke(8'h46, 8'h74); poke(8'h83, 8'hF0);
    poke(8'hFF, 8'h20);
    rst = 0;
    // manual operation: M(PC) -> register; PC+1 -> PC  (PC starts at 00)
    c = CTRL_IDLE; c.mr = 1; c.inc_pc = 1;
    c.ld_x = 1;  manual_step(c); c.ld_x = 0;
    c.ld_y = 1;  manual_step(c); c.ld_y = 0;
    c.ld_sp = 1; manual_step(c); c.ld_sp = 0;
    c.ld_cc = 1; c.g[9:2] = 8'b01010101; manual_step(c); c.ld_cc = 0; c.g = '0;
    c.ld_a = 1;  manual_step(c); c.ld_a = 0;
    check(reg_x == 8'h42 && reg_y == 8'hFF && reg_sp == 8'h80 && reg_a == 8'h5A,
          "manual register set-up");
    check(reg_cc == 4'b0011, $sformatf("manual CC set-up %b", reg_cc));
    check(state == 0, "state held at Q0 in manual mode");
    // automatic operation from the reset step
    manual = 0;
    @(negedge clk);
    check(state == 0 && ctrl.ld_pc, "reset step active");
    @(posedge clk); #1;
    check(reg_pc == 8'h20, $sformatf("PC from reset vector = %h", reg_pc));
    @(negedge clk);
    //          op    cyc reads Y      A      PC     NZVC
    run_one(8'hA1, 5, 3, 8'h96, 8'h5A, 8'h22, 4'b1001);
    run_one(8'hC1, 5, 3, 8'h74, 8'h5A, 8'h24, 4'b0001);
    run_one(8'h91, 4, 2, 8'h00, 8'h5A, 8'h26, 4'b0101);
    run_one(8'hB1, 5, 3, 8'hF0, 8'h5A, 8'h28, 4'b1001);
    run_one(8'hD1, 5, 3, 8'h42, 8'h5A, 8'h2A, 4'b0001);
    run_one(8'h05, 5, 1, 8'h42, 8'h00, 8'h2B, 4'b0100);
    run_one(8'h00, 4, 1, 8'h42, 8'h00, 8'h2C, 4'b0100);
    run_one(8'h91, 4, 2, 8'h7F, 8'h00, 8'h2E, 4'b0000);
    // manual store through the bus: Y -> M(X+T), then M(X+T) -> A
    manual = 1;
    c = CTRL_IDLE; c.oe_y = 1; c.mw = 1; c.g[13] = 1; c.g[12] = 1;
    manual_step(c);
    c = CTRL_IDLE; c.mr = 1; c.ld_a = 1; c.g[13] = 1; c.g[12] = 1;
    manual_step(c);
    check(reg_a == 8'h7F, $sformatf("manual MW/MR via X: A=%h expected 7F", reg_a));
    check(state == 1, "state held at Q1 in manual mode");
    // every mechanism must have happened
    check(n_manual > 0, "manual operation used");
    check(n_reset > 0, "reset step used");
    check(n_nf == 8, $sformatf("next fetch %0d times", n_nf));
    for (int i = 0; i < 5; i++)
      check(n_asel[i] > 0, $sformatf("address source %0d used", i));
    check(n_vclr_ckeep > 0, "V cleared with C kept");
    check(n_clra == 1, "CLRA executed");
    check(n_nop == 1, "NOP executed");
    $display("mechanisms: manual=%0d reset=%0d nf=%0d asel PC/SP/Y/X/TA=%0d/%0d/%0d/%0d/%0d vclr_ckeep=%0d clra=%0d nop=%0d",
             n_manual, n_reset, n_nf, n_asel[0], n_asel[1], n_asel[2], n_asel[3],
             n_asel[4], n_vclr_ckeep, n_clra, n_nop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
