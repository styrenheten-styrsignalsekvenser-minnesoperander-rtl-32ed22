// flisp_alu: arithmetic unit of the FLIS processor.
//
// The ALU is combinational. Its D input is the data bus (the operand being
// loaded); the function is chosen by f3..f0 and its result U goes to register
// R. It also produces the flags N (bit 7 of U), Z (U is zero), V (two's
// complement overflow) and C (carry out), which the CC register may take.
//
// Two function codes are defined, the two the processor's instruction
// sequences use:
//   f = 0000  U = 0        (all function selects low: "clear")
//   f = 1010  U = D + Cin  (f3 and f1 raised; with Cin = 0 this passes the
//                           operand through and gives its N and Z flags)
// Every other code yields U = 0 here; their functions are not part of this
// design. Cin is supplied by the surrounding datapath.
module flisp_alu
  import flisp_pkg::*;
(
  input  logic [DW-1:0] d,
  input  logic [3:0]    f,
  input  logic          cin,
  output logic [DW-1:0] u,
  output logic          n,
  output logic          z,
  output logic          v,
  output logic          c
);

  logic [DW:0] sum;

  always_comb begin
    sum = '0;
    v   = 1'b0;
    unique case (f)
      ALU_DPLUS: begin
        sum = {1'b0, d} + {{DW{1'b0}}, cin};
        // Adding a non-negative Cin overflows only from 0111..1 to 1000..0
        v   = ~d[DW-1] & sum[DW-1];
      end
      default: sum = '0;   // ALU_ZERO and codes not defined here
    endcase
    u = sum[DW-1:0];
    c = sum[DW];
    n = u[DW-1];
    z = (u == '0);
  end

endmodule
