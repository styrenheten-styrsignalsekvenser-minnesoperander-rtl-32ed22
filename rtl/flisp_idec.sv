// flisp_idec: instruction decoder of the control unit.
//
// Decodes the 8-bit contents of the instruction register I into 256 lines,
// line i[n] high exactly when I holds opcode n. The control logic combines
// these lines with the state lines Q (terms such as I05*Q4 or IC1*Q5).
// Purely combinational.
module flisp_idec
  import flisp_pkg::*;
(
  input  logic [DW-1:0]       ir,
  output logic [2**DW-1:0]    i_line
);

  always_comb begin
    i_line     = '0;
    i_line[ir] = 1'b1;
  end

endmodule
