// flisp_pkg: types and constants shared by the FLIS processor RTL.
//
// The control word ctrl_t bundles every control signal that the automatic
// control unit (or the manual panel) drives into the datapath: register
// load/increment/decrement/clear strobes, bus output enables, memory read and
// write, the ALU function select f3..f0, the selection signals g14..g0 and NF
// ("next fetch", instruction finished). The signal names and the meaning of
// f3..f0 = 0000 (clear), f3,f1 (D + Cin), g3..g2 (carry source), g5 (clear V)
// and g14..g12 (address source) follow the FLIS processor description; the
// other g encodings, the flag bit positions other than C, and the NOP opcode
// are this design's own choices.
package flisp_pkg;

  localparam int unsigned DW = 8;   // data width, memory shown as bits 7..0
  localparam int unsigned AW = 8;   // address width

  // Opcodes given by the instruction tables
  localparam logic [7:0] OP_NOP     = 8'h00;  // own choice
  localparam logic [7:0] OP_CLRA    = 8'h05;
  localparam logic [7:0] OP_LDY_IMM = 8'h91;  // LDY #Data
  localparam logic [7:0] OP_LDY_ABS = 8'hA1;  // LDY Adr
  localparam logic [7:0] OP_LDY_NSP = 8'hB1;  // LDY n,SP
  localparam logic [7:0] OP_LDY_NX  = 8'hC1;  // LDY n,X
  localparam logic [7:0] OP_LDY_NY  = 8'hD1;  // LDY n,Y

  // ALU function codes (f3..f0)
  localparam logic [3:0] ALU_ZERO  = 4'b0000; // U = 0
  localparam logic [3:0] ALU_DPLUS = 4'b1010; // U = D + Cin (f3, f1)

  // Flag bit positions in CC and on the bus
  localparam int unsigned CC_C = 0;
  localparam int unsigned CC_V = 1;
  localparam int unsigned CC_Z = 2;
  localparam int unsigned CC_N = 3;

  // Per-flag source select (g pair): 00 ALU, 01 bus bit, 10 clear, 11 keep
  typedef enum logic [1:0] {
    FSEL_ALU  = 2'b00,
    FSEL_BUS  = 2'b01,
    FSEL_CLR  = 2'b10,
    FSEL_KEEP = 2'b11
  } flag_sel_e;

  // Address source select g14..g12
  typedef enum logic [2:0] {
    ASEL_PC = 3'b000,  // PC + T
    ASEL_SP = 3'b001,  // SP + T
    ASEL_Y  = 3'b010,  // Y + T
    ASEL_X  = 3'b011,  // X + T
    ASEL_TA = 3'b100   // TA (1xx)
  } addr_sel_e;

  typedef struct packed {
    logic ld_a, oe_a;
    logic ld_r, oe_r;
    logic ld_x, oe_x;
    logic ld_y, oe_y;
    logic ld_sp, inc_sp, dec_sp, oe_sp;
    logic ld_pc, inc_pc, oe_pc;
    logic ld_ta;
    logic ld_t, clr_t;
    logic ld_i;
    logic ld_cc, oe_cc;
    logic mr, mw;
    logic nf;
    logic [3:0]  f;
    logic [14:0] g;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '0;

endpackage
