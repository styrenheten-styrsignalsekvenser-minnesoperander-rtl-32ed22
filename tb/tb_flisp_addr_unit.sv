// tb_flisp_addr_unit: self-checking test of flisp_addr_unit.
// Checks the g14..g12 table: 000 PC+T, 001 SP+T, 010 Y+T, 011 X+T, 1xx TA,
// first with the worked example of LDY 4,X (X = 42, T = 4 gives 46), then
// with random register values, including sums that wrap past FF.
module tb_flisp_addr_unit;
  logic [2:0] sel;
  logic [7:0] pc, sp, x, y, t, ta, addr, exp_addr;
  int checks = 0, failures = 0;

  flisp_addr_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = 8'h21; sp = 8'h80; x = 8'h42; y = 8'hFF; t = 8'h04; ta = 8'h42;
    sel = 3'b011; #1;
    checks++; if (addr !== 8'h46) begin failures++; $display("4,X gave %h", addr); end
    sel = 3'b100; #1;
    checks++; if (addr !== 8'h42) begin failures++; $display("TA gave %h", addr); end
    repeat (2000) begin
      sel = 3'($urandom); pc = 8'($urandom); sp = 8'($urandom);
      x = 8'($urandom); y = 8'($urandom); t = 8'($urandom); ta = 8'($urandom);
      #1;
      case (sel)
        3'b000: exp_addr = pc + t;
        3'b001: exp_addr = sp + t;
        3'b010: exp_addr = y + t;
        3'b011: exp_addr = x + t;
        default: exp_addr = ta;
      endcase
      checks++;
      if (addr !== exp_addr) begin
        failures++;
        $display("sel=%b addr=%h exp=%h", sel, addr, exp_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
