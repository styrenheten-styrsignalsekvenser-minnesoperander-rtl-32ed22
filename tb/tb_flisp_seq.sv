// tb_flisp_seq: self-checking test of flisp_seq.
// Checks reset to Q0, stepping Q0, Q1, Q2, ..., the one-hot state lines,
// the return to Q1 on NF, holding while run is low, and the return to Q1
// after the last state.
module tb_flisp_seq;
  localparam int NQ = 16;
  logic clk = 0, rst, run, nf;
  logic [3:0] k;
  logic [NQ-1:0] q;
  int checks = 0, failures = 0;
  int model;

  flisp_seq #(.NQ(NQ), .FETCH_Q(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk();
    checks++;
    if (k !== 4'(model) || q !== (NQ'(1) << model)) begin
      failures++;
      $display("k=%0d q=%b exp %0d", k, q, model);
    end
  endtask

  initial begin
    rst = 1; run = 1; nf = 0;
    @(posedge clk); #1; rst = 0; model = 0; chk();
    for (int s = 1; s < NQ; s++) begin @(posedge clk); #1; model = s; chk(); end
    @(posedge clk); #1; model = 1; chk();            // wrap to fetch
    repeat (3) begin @(posedge clk); #1; model++; chk(); end
    nf = 1; @(posedge clk); #1; nf = 0; model = 1; chk();
    run = 0; repeat (3) begin @(posedge clk); #1; chk(); end
    nf = 1; @(posedge clk); #1; chk();               // NF ignored while held
    nf = 0; run = 1;
    repeat (300) begin
      nf = 1'($urandom_range(0, 3) == 0);
      run = 1'($urandom_range(0, 4) != 0);
      @(posedge clk); #1;
      if (run) model = (nf || model == NQ - 1) ? 1 : model + 1;
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
