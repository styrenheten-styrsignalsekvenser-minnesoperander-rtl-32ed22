// tb_flisp_control_unit: self-checking test of flisp_control_unit.
// Holds an opcode in the instruction input and follows the unit from reset:
// Q0 (reset), Q1, Q2 (fetch), Q3 (decode), then the execute steps. Checks the
// state number and the key signals of each step, and that each instruction
// returns to Q1 after the number of execute states given by its sequence
// (1 for NOP and LDY #Data, 2 for CLRA and the other LDY modes). Also checks
// that the unit holds its state while run is low.
module tb_flisp_control_unit;
  import flisp_pkg::*;
  logic clk = 0, rst, run;
  logic [7:0] ir;
  ctrl_t ctrl;
  logic [3:0] state;
  int checks = 0, failures = 0;

  flisp_control_unit #(.NQ(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(int s, string what);
    checks++;
    if (state !== 4'(s)) begin
      failures++;
      $display("%s: state %0d, expected %0d", what, state, s);
    end
  endtask

  task automatic expect_sig(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%s failed (state %0d)", what, state); end
  endtask

  // Run one instruction starting in Q1; return the execute-state count.
  task automatic run_instr(logic [7:0] op, int exp_exec);
    int n_exec;
    ir = op;
    expect_state(1, "fetch start");
    expect_sig(ctrl.clr_t, "CLR_T in Q1");
    @(posedge clk); #1;
    expect_state(2, "fetch");
    expect_sig(ctrl.mr && ctrl.ld_i && ctrl.inc_pc, "M(PC)->I; PC+1->PC in Q2");
    @(posedge clk); #1;
    expect_state(3, "decode");
    expect_sig(ctrl == CTRL_IDLE, "no signal in Q3");
    @(posedge clk); #1;
    n_exec = 0;
    while (state >= 4 && n_exec < 10) begin
      n_exec++;
      if (op == OP_LDY_IMM) expect_sig(ctrl.ld_y && ctrl.nf, "LDY # in Q4");
      if (op == OP_CLRA && state == 4) expect_sig(ctrl.ld_r && !ctrl.nf, "CLRA Q4");
      if (op == OP_CLRA && state == 5) expect_sig(ctrl.oe_r && ctrl.ld_a && ctrl.nf, "CLRA Q5");
      if (op == OP_LDY_NX && state == 5)
        expect_sig(ctrl.g[14:12] == 3'b011 && ctrl.ld_y, "LDY n,X Q5");
      @(posedge clk); #1;
    end
    checks++;
    if (n_exec != exp_exec) begin
      failures++;
      $display("op %h: %0d execute states, expected %0d", op, n_exec, exp_exec);
    end
  endtask

  initial begin
    rst = 1; run = 1; ir = 8'h00;
    @(posedge clk); #1; rst = 0;
    expect_state(0, "reset");
    expect_sig(ctrl.mr && ctrl.ld_pc && ctrl.g[14], "M(TA)->PC in Q0");
    @(posedge clk); #1;
    run_instr(OP_NOP, 1);
    run_instr(OP_CLRA, 2);
    run_instr(OP_LDY_IMM, 1);
    run_instr(OP_LDY_ABS, 2);
    run_instr(OP_LDY_NSP, 2);
    run_instr(OP_LDY_NX, 2);
    run_instr(OP_LDY_NY, 2);
    run_instr(8'h3C, 1);           // an opcode with no sequence acts as NOP
    // hold while run is low
    ir = OP_CLRA;
    @(posedge clk); #1;            // now in Q2
    run = 0;
    repeat (4) @(posedge clk);
    #1 expect_state(2, "held");
    run = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
