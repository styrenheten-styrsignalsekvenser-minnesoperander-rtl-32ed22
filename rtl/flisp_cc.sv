// flisp_cc: condition code register (flags N, Z, V, C) with source selection.
//
// On a clock edge with ld_cc raised each flag takes a new value chosen by its
// own two-bit select: 00 the ALU's flag, 01 a bit of the data bus, 10 zero,
// 11 its old value. The carry select (g3,g2) with exactly this encoding, and
// C on bus bit 0, follow the processor description; raising g5 alone clears V,
// which fixes V's select as (g5,g4) with the same encoding. The selects for Z
// (g7,g6) and N (g9,g8) and the bus bits for V, Z and N (1, 2, 3) are this
// design's own choice. CC drives the bus as 0000NZVC.
module flisp_cc
  import flisp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ld_cc,
  input  flag_sel_e   sel_n,
  input  flag_sel_e   sel_z,
  input  flag_sel_e   sel_v,
  input  flag_sel_e   sel_c,
  input  logic        alu_n,
  input  logic        alu_z,
  input  logic        alu_v,
  input  logic        alu_c,
  input  logic [3:0]  bus,
  output logic [3:0]  cc      // {N, Z, V, C}
);

  function automatic logic pick(flag_sel_e sel, logic from_alu, logic from_bus,
                                logic old);
    unique case (sel)
      FSEL_ALU:  return from_alu;
      FSEL_BUS:  return from_bus;
      FSEL_CLR:  return 1'b0;
      default:   return old;
    endcase
  endfunction

  logic [3:0] nxt;

  always_comb begin
    nxt[CC_N] = pick(sel_n, alu_n, bus[CC_N], cc[CC_N]);
    nxt[CC_Z] = pick(sel_z, alu_z, bus[CC_Z], cc[CC_Z]);
    nxt[CC_V] = pick(sel_v, alu_v, bus[CC_V], cc[CC_V]);
    nxt[CC_C] = pick(sel_c, alu_c, bus[CC_C], cc[CC_C]);
  end

  always_ff @(posedge clk) begin
    if (rst)        cc <= '0;
    else if (ld_cc) cc <= nxt;
  end

endmodule
