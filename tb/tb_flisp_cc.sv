// tb_flisp_cc: self-checking test of flisp_cc.
// Applies random flag selects, ALU flags, bus values and load strobes and
// compares CC with a model: select 00 takes the ALU flag, 01 the bus bit
// (C bit 0, V bit 1, Z bit 2, N bit 3), 10 clears, 11 keeps. Also checks the
// load used by LDY (N, Z from ALU, V cleared, C kept).
module tb_flisp_cc;
  import flisp_pkg::*;
  logic clk = 0, rst, ld_cc;
  flag_sel_e sel_n, sel_z, sel_v, sel_c;
  logic alu_n, alu_z, alu_v, alu_c;
  logic [3:0] bus, cc, model;
  logic [3:0] alu, sel_arr [4];
  int checks = 0, failures = 0;

  flisp_cc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_pick(logic [1:0] s, logic a, logic b, logic o);
    if (s == 2'b00) return a;
    if (s == 2'b01) return b;
    if (s == 2'b10) return 1'b0;
    return o;
  endfunction

  initial begin
    rst = 1; ld_cc = 0; bus = 0;
    {alu_n, alu_z, alu_v, alu_c} = 0;
    sel_n = FSEL_ALU; sel_z = FSEL_ALU; sel_v = FSEL_ALU; sel_c = FSEL_ALU;
    @(posedge clk); #1; rst = 0; model = 0;
    checks++; if (cc !== 4'b0000) failures++;
    // LDY-style load: N,Z from ALU, V cleared, C kept. First set C=1, V=1 from bus.
    sel_n = FSEL_BUS; sel_z = FSEL_BUS; sel_v = FSEL_BUS; sel_c = FSEL_BUS;
    bus = 4'b0011; ld_cc = 1; @(posedge clk); #1;
    checks++; if (cc !== 4'b0011) begin failures++; $display("bus load %b", cc); end
    sel_n = FSEL_ALU; sel_z = FSEL_ALU; sel_v = FSEL_CLR; sel_c = FSEL_KEEP;
    {alu_n, alu_z, alu_v, alu_c} = 4'b1010; bus = 4'b0000;
    @(posedge clk); #1;
    checks++; if (cc !== 4'b1001) begin failures++; $display("ldy flags %b", cc); end
    model = cc;
    repeat (500) begin
      ld_cc = 1'($urandom);
      sel_n = flag_sel_e'($urandom); sel_z = flag_sel_e'($urandom);
      sel_v = flag_sel_e'($urandom); sel_c = flag_sel_e'($urandom);
      alu = 4'($urandom); {alu_n, alu_z, alu_v, alu_c} = alu;
      bus = 4'($urandom);
      @(posedge clk); #1;
      if (ld_cc) begin
        model = { ref_pick(sel_n, alu[3], bus[3], model[3]),
                  ref_pick(sel_z, alu[2], bus[2], model[2]),
                  ref_pick(sel_v, alu[1], bus[1], model[1]),
                  ref_pick(sel_c, alu[0], bus[0], model[0]) };
      end
      checks++;
      if (cc !== model) begin
        failures++;
        $display("cc=%b exp=%b", cc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
