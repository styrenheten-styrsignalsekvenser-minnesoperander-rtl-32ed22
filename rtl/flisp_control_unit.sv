// flisp_control_unit: the automatic control unit of the FLIS processor.
//
// It joins the sequence counter (flisp_seq), the instruction decoder
// (flisp_idec) and the sum-of-products control logic (flisp_ctrl_logic):
// the contents of the instruction register select which control-signal
// sequence runs, and the state lines Q0, Q1, ... step through it, one step
// per clock. NF in a step sends the counter back to fetch. Inputs: the
// instruction register contents and run (low holds the counter, for manual
// operation). Outputs: the control word and the current state number.
module flisp_control_unit
  import flisp_pkg::*;
#(
  parameter int unsigned NQ = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  run,
  input  logic [DW-1:0]         ir,
  output ctrl_t                 ctrl,
  output logic [$clog2(NQ)-1:0] state
);

  logic [NQ-1:0]    q;
  logic [2**DW-1:0] i_line;

  flisp_idec u_idec (.ir(ir), .i_line(i_line));

  flisp_ctrl_logic #(.NQ(NQ)) u_logic (.q(q), .i_line(i_line), .ctrl(ctrl));

  flisp_seq #(.NQ(NQ), .FETCH_Q(1)) u_seq (
    .clk(clk), .rst(rst), .run(run), .nf(ctrl.nf), .k(state), .q(q)
  );

endmodule
