// tb_flisp_ctrl_logic: self-checking test of flisp_ctrl_logic.
// For every opcode and every state line it compares the whole control word
// with the signal lists of the instruction tables: CLRA (LD_R in Q4; OE_R,
// LD_A, LD_CC, NF in Q5), LDY #Data (MR, LD_Y, INC_PC and the flag signals
// f3 f1 g5 g3 g2 LD_CC with NF in Q4), LDY Adr (MR, LD_TA, INC_PC in Q4; MR,
// g14, LD_Y, flags, NF in Q5), LDY n,SP / n,Y / n,X (MR, LD_T, INC_PC in Q4;
// MR, g12 and/or g13, LD_Y, flags, NF in Q5), and the reset/fetch steps.
module tb_flisp_ctrl_logic;
  import flisp_pkg::*;
  localparam int NQ = 16;
  logic [NQ-1:0] q;
  logic [255:0] i_line;
  ctrl_t ctrl, e;
  int checks = 0, failures = 0;

  flisp_ctrl_logic #(.NQ(NQ)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t flags(ctrl_t c);
    c.f[3] = 1; c.f[1] = 1; c.g[5] = 1; c.g[3] = 1; c.g[2] = 1; c.ld_cc = 1;
    return c;
  endfunction

  function automatic ctrl_t expected(int op, int st);
    ctrl_t c = '0;
    case (st)
      0: begin c.mr = 1; c.g[14] = 1; c.ld_pc = 1; end
      1: c.clr_t = 1;
      2: begin c.mr = 1; c.ld_i = 1; c.inc_pc = 1; end
      3: ;
      4: case (op)
           'h05: c.ld_r = 1;
           'h91: begin c = flags(c); c.mr = 1; c.ld_y = 1; c.inc_pc = 1; c.nf = 1; end
           'hA1: begin c.mr = 1; c.ld_ta = 1; c.inc_pc = 1; end
           'hB1, 'hC1, 'hD1: begin c.mr = 1; c.ld_t = 1; c.inc_pc = 1; end
           default: c.nf = 1;
         endcase
      5: case (op)
           'h05: begin c.oe_r = 1; c.ld_a = 1; c.ld_cc = 1; c.nf = 1; end
           'hA1: begin c = flags(c); c.mr = 1; c.g[14] = 1; c.ld_y = 1; c.nf = 1; end
           'hB1: begin c = flags(c); c.mr = 1; c.g[12] = 1; c.ld_y = 1; c.nf = 1; end
           'hD1: begin c = flags(c); c.mr = 1; c.g[13] = 1; c.ld_y = 1; c.nf = 1; end
           'hC1: begin c = flags(c); c.mr = 1; c.g[13] = 1; c.g[12] = 1; c.ld_y = 1; c.nf = 1; end
           default: ;
         endcase
      default: ;
    endcase
    return c;
  endfunction

  initial begin
    for (int op = 0; op < 256; op++)
      for (int st = 0; st < NQ; st++) begin
        i_line = '0; i_line[op] = 1'b1;
        q = '0; q[st] = 1'b1;
        #1;
        e = expected(op, st);
        checks++;
        if (ctrl !== e) begin
          failures++;
          if (failures < 10)
            $display("op=%h Q%0d: got %h exp %h", op, st, ctrl, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
