// tb_flisp_mem: self-checking test of flisp_mem.
// Fills the memory through the load port, reads it back with MR, checks that
// the read data are zero without MR, writes with MW and checks that the load
// port wins over MW when both write in the same cycle.
module tb_flisp_mem;
  logic clk = 0, mr, mw, load_we;
  logic [7:0] addr, wdata, rdata, load_addr, load_data;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  flisp_mem #(.DEPTH(256)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mr = 0; mw = 0; load_we = 0; addr = 0; wdata = 0; load_addr = 0; load_data = 0;
    for (int a = 0; a < 256; a++) begin
      load_we = 1; load_addr = 8'(a); load_data = 8'($urandom);
      model[a] = load_data;
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); mr = 1; #1;
      checks++; if (rdata !== model[a]) begin failures++; $display("rd %h %h/%h", a, rdata, model[a]); end
      mr = 0; #1;
      checks++; if (rdata !== 8'h00) failures++;
    end
    repeat (200) begin
      addr = 8'($urandom); wdata = 8'($urandom); mw = 1;
      @(posedge clk); #1; mw = 0;
      model[addr] = wdata;
      addr = 8'($urandom); mr = 1; #1;
      checks++; if (rdata !== model[addr]) begin failures++; $display("rw %h", addr); end
      mr = 0;
    end
    // load port has priority over MW
    addr = 8'h10; wdata = 8'hAA; mw = 1;
    load_we = 1; load_addr = 8'h10; load_data = 8'h55;
    @(posedge clk); #1; mw = 0; load_we = 0; mr = 1; #1;
    checks++; if (rdata !== 8'h55) begin failures++; $display("priority %h", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
