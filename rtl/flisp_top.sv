// flisp_top: the FLIS processor - datapath, memory and control unit.
//
// An 8-bit single-bus processor. Registers A, R, X, Y, SP, PC, CC and the
// memory drive one data bus through output enables; A, X, Y, SP, PC, TA, T
// and the instruction register I load from it, R loads the ALU result, and
// CC takes flags from the ALU or the bus. The address calculation unit forms
// the memory address as PC/SP/Y/X + T or as TA. The automatic control unit
// issues one control word per clock, stepping through the control-signal
// sequence of the instruction in I.
//
// Operating modes: with manual low the control unit runs; with manual high
// its state counter holds and the control word comes from manual_ctrl, as if
// set by hand on a control panel (used to set register values before a run).
// A load port writes memory from outside (used to place a program).
//
// Implemented instructions: NOP (00, own choice of opcode), CLRA (05), LDY in
// its five addressing modes (91, A1, B1, C1, D1); other opcodes act as NOP.
// On reset all registers clear, except TA which is set to FF so that the
// reset step loads PC from address FF (an own choice). The ALU carry input is
// selected by g1,g0 (00: 0, 01: 1, 1x: CC(C)), also an own choice.
module flisp_top
  import flisp_pkg::*;
#(
  parameter int unsigned NQ        = 16,
  parameter int unsigned MEM_DEPTH = 256
) (
  input  logic                  clk,
  input  logic                  rst,
  // mode switch: 0 automatic (control unit), 1 manual (manual_ctrl)
  input  logic                  manual,
  input  ctrl_t                 manual_ctrl,
  // host memory load port
  input  logic                  load_we,
  input  logic [AW-1:0]         load_addr,
  input  logic [DW-1:0]         load_data,
  // visible state
  output logic [DW-1:0]         reg_a,
  output logic [DW-1:0]         reg_x,
  output logic [DW-1:0]         reg_y,
  output logic [DW-1:0]         reg_sp,
  output logic [DW-1:0]         reg_pc,
  output logic [3:0]            reg_cc,    // {N, Z, V, C}
  output logic [DW-1:0]         reg_i,
  output logic [$clog2(NQ)-1:0] state,
  output ctrl_t                 ctrl,
  output logic [DW-1:0]         data_bus,
  output logic [AW-1:0]         addr_bus
);

  ctrl_t auto_ctrl;
  logic [DW-1:0] r_q, t_q, ta_q, mem_rd, alu_u;
  logic alu_n, alu_z, alu_v, alu_c, alu_cin;
  logic bus_conflict;

  // ---------------- control ----------------
  flisp_control_unit #(.NQ(NQ)) u_cu (
    .clk(clk), .rst(rst), .run(!manual), .ir(reg_i),
    .ctrl(auto_ctrl), .state(state)
  );

  assign ctrl = manual ? manual_ctrl : auto_ctrl;

  // ---------------- data bus ----------------
  localparam int unsigned NSRC = 8;
  logic [DW-1:0] src [NSRC];
  logic [NSRC-1:0] oe;

  assign src = '{reg_a, r_q, reg_x, reg_y, reg_sp, reg_pc, DW'(reg_cc), mem_rd};
  assign oe  = {ctrl.mr, ctrl.oe_cc, ctrl.oe_pc, ctrl.oe_sp, ctrl.oe_y,
                ctrl.oe_x, ctrl.oe_r, ctrl.oe_a};

  flisp_bus #(.N(NSRC)) u_bus (
    .oe(oe), .src(src), .bus(data_bus), .conflict(bus_conflict)
  );

  // ---------------- registers ----------------
  flisp_reg u_a  (.clk, .rst, .ld(ctrl.ld_a),  .inc(1'b0), .dec(1'b0),
                  .clr(1'b0), .d(data_bus), .q(reg_a));
  flisp_reg u_r  (.clk, .rst, .ld(ctrl.ld_r),  .inc(1'b0), .dec(1'b0),
                  .clr(1'b0), .d(alu_u), .q(r_q));
  flisp_reg u_x  (.clk, .rst, .ld(ctrl.ld_x),  .inc(1'b0), .dec(1'b0),
                  .clr(1'b0), .d(data_bus), .q(reg_x));
  flisp_reg u_y  (.clk, .rst, .ld(ctrl.ld_y),  .inc(1'b0), .dec(1'b0),
                  .clr(1'b0), .d(data_bus), .q(reg_y));
  flisp_reg u_sp (.clk, .rst, .ld(ctrl.ld_sp), .inc(ctrl.inc_sp),
                  .dec(ctrl.dec_sp), .clr(1'b0), .d(data_bus), .q(reg_sp));
  flisp_reg u_pc (.clk, .rst, .ld(ctrl.ld_pc), .inc(ctrl.inc_pc), .dec(1'b0),
                  .clr(1'b0), .d(data_bus), .q(reg_pc));
  flisp_reg #(.RESET_VAL(8'hFF)) u_ta (.clk, .rst, .ld(ctrl.ld_ta),
                  .inc(1'b0), .dec(1'b0), .clr(1'b0), .d(data_bus), .q(ta_q));
  flisp_reg u_t  (.clk, .rst, .ld(ctrl.ld_t),  .inc(1'b0), .dec(1'b0),
                  .clr(ctrl.clr_t), .d(data_bus), .q(t_q));
  flisp_reg u_i  (.clk, .rst, .ld(ctrl.ld_i),  .inc(1'b0), .dec(1'b0),
                  .clr(1'b0), .d(data_bus), .q(reg_i));

  // ---------------- ALU and flags ----------------
  always_comb begin
    unique case (ctrl.g[1:0])
      2'b00:   alu_cin = 1'b0;
      2'b01:   alu_cin = 1'b1;
      default: alu_cin = reg_cc[CC_C];
    endcase
  end

  flisp_alu u_alu (
    .d(data_bus), .f(ctrl.f), .cin(alu_cin),
    .u(alu_u), .n(alu_n), .z(alu_z), .v(alu_v), .c(alu_c)
  );

  flisp_cc u_cc (
    .clk, .rst, .ld_cc(ctrl.ld_cc),
    .sel_n(flag_sel_e'(ctrl.g[9:8])), .sel_z(flag_sel_e'(ctrl.g[7:6])),
    .sel_v(flag_sel_e'(ctrl.g[5:4])), .sel_c(flag_sel_e'(ctrl.g[3:2])),
    .alu_n, .alu_z, .alu_v, .alu_c, .bus(data_bus[3:0]), .cc(reg_cc)
  );

  // ---------------- address unit and memory ----------------
  flisp_addr_unit u_au (
    .sel(ctrl.g[14:12]), .pc(reg_pc), .sp(reg_sp), .x(reg_x), .y(reg_y),
    .t(t_q), .ta(ta_q), .addr(addr_bus)
  );

  flisp_mem #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk, .addr(addr_bus), .mr(ctrl.mr), .mw(ctrl.mw), .wdata(data_bus),
    .rdata(mem_rd), .load_we, .load_addr, .load_data
  );

  // At most one source may drive the data bus in any clock cycle.
  a_bus_one_driver: assert property (@(posedge clk) disable iff (rst)
                                     !bus_conflict)
    else $error("flisp_top: more than one data bus driver enabled");

endmodule
