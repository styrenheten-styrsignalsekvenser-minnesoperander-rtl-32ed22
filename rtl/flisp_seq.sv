// flisp_seq: the control unit's sequence counter, producing states Q0..Q(NQ-1).
//
// The counter holds a state number k and decodes it one-hot into q. Reset
// puts it in Q0, the reset step. On each rising clock edge while run is high
// it advances to Q(k+1), unless NF ("next fetch", raised in the last step of
// every instruction) is high: then it returns to the first fetch state
// FETCH_Q. From the last state it also returns to FETCH_Q. While run is low
// (manual operation) it holds. The counter plus one-hot decoder matches the
// numbered state chain of the processor; NQ = 16 and FETCH_Q = 1 are this
// design's choices.
module flisp_seq #(
  parameter int unsigned NQ      = 16,
  parameter int unsigned FETCH_Q = 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  run,
  input  logic                  nf,
  output logic [$clog2(NQ)-1:0] k,
  output logic [NQ-1:0]         q
);

  localparam int unsigned KW = $clog2(NQ);

  always_ff @(posedge clk) begin
    if (rst)                        k <= '0;
    else if (run) begin
      if (nf || k == KW'(NQ - 1))   k <= KW'(FETCH_Q);
      else                          k <= k + KW'(1);
    end
  end

  always_comb begin
    q    = '0;
    q[k] = 1'b1;
  end

endmodule
