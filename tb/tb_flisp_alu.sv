// tb_flisp_alu: self-checking test of flisp_alu.
// Runs every operand and carry-in through the clear function (f = 0000) and
// the D + Cin function (f = 1010), computing result and flags N, Z, V, C
// independently, and checks that the remaining codes give zero.
module tb_flisp_alu;
  import flisp_pkg::*;
  logic [7:0] d, u;
  logic [3:0] f;
  logic cin, n, z, v, c;
  int checks = 0, failures = 0;
  int s;
  logic [7:0] eu;
  logic en, ez, ev, ec;

  flisp_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int fi = 0; fi < 16; fi++)
      for (int di = 0; di < 256; di++)
        for (int ci = 0; ci < 2; ci++) begin
          f = 4'(fi); d = 8'(di); cin = 1'(ci);
          #1;
          if (fi == 10) begin
            s  = di + ci;
            eu = 8'(s);
            ec = (s > 255);
            ev = (di < 128) && (eu >= 128);
          end else begin
            eu = 0; ec = 0; ev = 0;
          end
          en = eu[7];
          ez = (eu == 0);
          checks++;
          if ({u, n, z, v, c} !== {eu, en, ez, ev, ec}) begin
            failures++;
            if (failures < 10)
              $display("f=%b d=%h cin=%b: got %h NZVC=%b%b%b%b exp %h %b%b%b%b",
                       f, d, cin, u, n, z, v, c, eu, en, ez, ev, ec);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
