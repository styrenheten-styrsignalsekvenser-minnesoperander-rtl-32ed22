// flisp_ctrl_logic: control-signal generator of the automatic control unit.
//
// Every control signal is an OR of AND terms, each term a state line Qk
// alone or a state line together with an instruction line In (for example
// LD_R = I05*Q4, LD_Y = I91*Q4 + IA1*Q5 + ...). Combinational.
//
// Sequences (the instruction steps follow the processor description; the
// reset and fetch steps are this design's own, written so that execution
// always starts in Q4 and T is zero during fetch):
//   Q0  reset:   M(TA) -> PC   (TA resets to FF, so PC = M(FF))
//   Q1  fetch:   0 -> T
//   Q2  fetch:   M(PC) -> I; PC+1 -> PC
//   Q3  decode:  no signal
//   CLRA   (05) Q4: 0 -> R               Q5: R -> A; ALU flags -> CC; NF
//   LDY #  (91) Q4: M(PC) -> Y; PC+1 -> PC; flags; NF
//   LDY Adr(A1) Q4: M(PC) -> TA; PC+1 -> PC    Q5: M(TA) -> Y; flags; NF
//   LDY n,SP (B1), n,Y (D1), n,X (C1)
//               Q4: M(PC) -> T; PC+1 -> PC     Q5: M(T+base) -> Y; flags; NF
//   any other opcode, NOP (00) among them: Q4: NF
// "flags" is ALU(N,Z) -> CC; 0 -> CC(V); CC(C) -> CC(C), i.e. f3, f1, g5,
// g3, g2 and LD_CC. State lines Q3 and Q6..Q15 raise no signal in this
// instruction set, so those inputs are unused (a lint note, not a fault).
module flisp_ctrl_logic
  import flisp_pkg::*;
#(
  parameter int unsigned NQ = 16
) (
  input  logic [NQ-1:0]    q,
  input  logic [2**DW-1:0] i_line,
  output ctrl_t            ctrl
);

  logic i_clra, i_ldy_imm, i_ldy_abs, i_ldy_nsp, i_ldy_nx, i_ldy_ny;
  logic i_ldy_idx, i_other;
  logic ldy_final;   // the step of an LDY that loads Y and sets the flags

  always_comb begin
    i_clra    = i_line[OP_CLRA];
    i_ldy_imm = i_line[OP_LDY_IMM];
    i_ldy_abs = i_line[OP_LDY_ABS];
    i_ldy_nsp = i_line[OP_LDY_NSP];
    i_ldy_nx  = i_line[OP_LDY_NX];
    i_ldy_ny  = i_line[OP_LDY_NY];
    i_ldy_idx = i_ldy_nsp | i_ldy_nx | i_ldy_ny;
    i_other   = ~(i_clra | i_ldy_imm | i_ldy_abs | i_ldy_idx);

    ldy_final = (i_ldy_imm & q[4]) | (i_ldy_abs & q[5]) | (i_ldy_idx & q[5]);

    ctrl = CTRL_IDLE;

    ctrl.mr     = q[0] | q[2] | ldy_final
                | ((i_ldy_abs | i_ldy_idx) & q[4]);
    ctrl.ld_pc  = q[0];
    ctrl.clr_t  = q[1];
    ctrl.ld_i   = q[2];
    ctrl.inc_pc = q[2] | (i_ldy_imm & q[4]) | ((i_ldy_abs | i_ldy_idx) & q[4]);

    ctrl.ld_ta  = i_ldy_abs & q[4];
    ctrl.ld_t   = i_ldy_idx & q[4];
    ctrl.ld_y   = ldy_final;

    ctrl.ld_r   = i_clra & q[4];
    ctrl.oe_r   = i_clra & q[5];
    ctrl.ld_a   = i_clra & q[5];

    ctrl.ld_cc  = (i_clra & q[5]) | ldy_final;
    ctrl.f[3]   = ldy_final;
    ctrl.f[1]   = ldy_final;
    ctrl.g[5]   = ldy_final;
    ctrl.g[3]   = ldy_final;
    ctrl.g[2]   = ldy_final;

    // address source: 1xx (TA) for reset and LDY Adr, 001/010/011 for n,SP/Y/X
    ctrl.g[14]  = q[0] | (i_ldy_abs & q[5]);
    ctrl.g[13]  = (i_ldy_nx | i_ldy_ny) & q[5];
    ctrl.g[12]  = (i_ldy_nx | i_ldy_nsp) & q[5];

    ctrl.nf     = (i_clra & q[5]) | ldy_final | (i_other & q[4]);
  end

endmodule
