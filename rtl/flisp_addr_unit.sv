// flisp_addr_unit: address calculation unit of the FLIS processor.
//
// A 4-to-1 multiplexer driven by g13,g12 picks a base register (0 PC, 1 SP,
// 2 Y, 3 X); an adder adds the offset register T to it; a 2-to-1 multiplexer
// driven by g14 then picks either that sum (0) or the address register TA (1)
// for the address bus. This is the structure and the select table of the
// description. Because T is cleared during instruction fetch, selection 000
// addresses memory at PC itself. The unit is combinational; the sum wraps
// modulo 2^AW (the wrap is this design's choice).
module flisp_addr_unit
  import flisp_pkg::*;
(
  input  logic [2:0]    sel,     // {g14, g13, g12}
  input  logic [DW-1:0] pc,
  input  logic [DW-1:0] sp,
  input  logic [DW-1:0] x,
  input  logic [DW-1:0] y,
  input  logic [DW-1:0] t,
  input  logic [DW-1:0] ta,
  output logic [AW-1:0] addr
);

  logic [DW-1:0] base;

  always_comb begin
    unique case (sel[1:0])
      2'd0: base = pc;
      2'd1: base = sp;
      2'd2: base = y;
      default: base = x;
    endcase
    addr = sel[2] ? AW'(ta) : AW'(base + t);
  end

endmodule
