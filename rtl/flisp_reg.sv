// flisp_reg: one register of the FLIS datapath (A, R, X, Y, SP, PC, TA, T, I).
//
// Every register of the processor has the same shape: a clock input CP, a
// parallel load LD from its data input, and, for some of them, INC, DEC or CLR
// strobes (SP has INC/DEC, PC has INC, T has CLR). Unused strobes are tied low
// where the register is instantiated. All strobes act on the rising clock
// edge. If several are raised at once the priority is CLR, LD, INC, DEC; the
// description never raises two of them together, so this order is this
// design's own. The synchronous reset loads RESET_VAL.
module flisp_reg #(
  parameter int unsigned    W         = 8,
  parameter logic [W-1:0]   RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic         inc,
  input  logic         dec,
  input  logic         clr,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)      q <= RESET_VAL;
    else if (clr) q <= '0;
    else if (ld)  q <= d;
    else if (inc) q <= q + W'(1);
    else if (dec) q <= q - W'(1);
  end

endmodule
