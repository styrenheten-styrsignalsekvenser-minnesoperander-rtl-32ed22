// tb_flisp_bus: self-checking test of flisp_bus.
// With one or no enable raised the bus must carry exactly that source (or
// zero); with two or more, conflict must rise.
module tb_flisp_bus;
  localparam int N = 8;
  logic [N-1:0] oe;
  logic [7:0] src [N];
  logic [7:0] bus, exp_bus;
  logic conflict;
  int checks = 0, failures = 0;
  int sel;

  flisp_bus #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) begin
      for (int i = 0; i < N; i++) src[i] = 8'($urandom);
      sel = $urandom_range(0, N);      // N means no driver
      oe = '0;
      if (sel < N) oe[sel] = 1'b1;
      exp_bus = (sel < N) ? src[sel] : 8'h00;
      #1;
      checks++;
      if (bus !== exp_bus || conflict) begin
        failures++;
        $display("oe=%b bus=%h exp=%h conflict=%b", oe, bus, exp_bus, conflict);
      end
      // two drivers
      oe[sel % N] = 1'b1;
      oe[(sel + 1 + $urandom_range(0, N-2)) % N] = 1'b1;
      #1;
      checks++;
      if (!conflict) begin failures++; $display("no conflict for oe=%b", oe); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
