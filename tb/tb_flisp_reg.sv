// tb_flisp_reg: self-checking test of flisp_reg.
// Drives random combinations of CLR, LD, INC and DEC and compares the
// register with a model that applies the priority CLR > LD > INC > DEC,
// including wrap-around at 00 and FF and the reset value.
module tb_flisp_reg;
  logic clk = 0, rst, ld, inc, dec, clr;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  flisp_reg #(.W(8), .RESET_VAL(8'h5A)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 0; inc = 0; dec = 0; clr = 0; d = 0;
    @(posedge clk); #1;
    checks++; if (q !== 8'h5A) begin failures++; $display("reset value %h", q); end
    rst = 0;
    model = 8'h5A;
    // directed wrap cases
    d = 8'hFF; ld = 1; @(posedge clk); #1; ld = 0; model = 8'hFF;
    inc = 1; @(posedge clk); #1; inc = 0; model = 8'h00;
    checks++; if (q !== 8'h00) begin failures++; $display("inc wrap %h", q); end
    dec = 1; @(posedge clk); #1; dec = 0; model = 8'hFF;
    checks++; if (q !== 8'hFF) begin failures++; $display("dec wrap %h", q); end
    repeat (400) begin
      {clr, ld, inc, dec} = 4'($urandom);
      d = 8'($urandom);
      @(posedge clk); #1;
      if (clr)      model = 8'h00;
      else if (ld)  model = d;
      else if (inc) model = model + 8'd1;
      else if (dec) model = model - 8'd1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch clr=%b ld=%b inc=%b dec=%b q=%h exp=%h",
                 clr, ld, inc, dec, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
