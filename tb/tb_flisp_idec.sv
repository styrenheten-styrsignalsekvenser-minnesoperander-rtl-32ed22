// tb_flisp_idec: self-checking test of flisp_idec.
// For every opcode exactly its own line must be high.
module tb_flisp_idec;
  logic [7:0] ir;
  logic [255:0] i_line;
  int checks = 0, failures = 0;

  flisp_idec dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 256; op++) begin
      ir = 8'(op); #1;
      for (int l = 0; l < 256; l++) begin
        checks++;
        if (i_line[l] !== (l == op)) begin
          failures++;
          if (failures < 10) $display("ir=%h line %h = %b", ir, l, i_line[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
