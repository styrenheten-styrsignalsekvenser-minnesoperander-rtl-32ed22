// flisp_mem: the processor's primary memory ("Minne"), DEPTH words of DW bits.
//
// A read is combinational: while MR is raised the word at addr is driven to
// rdata (zero otherwise), so an instruction step such as M(PC) -> Y completes
// in one clock. A write with MW stores wdata at addr on the rising clock edge.
// A separate load port (load_we, load_addr, load_data), also written on the
// clock edge, lets a host place a program and data in memory before the
// processor runs; it takes priority over MW. The load port and the
// asynchronous read are this design's choices.
module flisp_mem
  import flisp_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          mr,
  input  logic          mw,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [DW-1:0] load_data
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we)  mem[load_addr] <= load_data;
    else if (mw)  mem[addr]      <= wdata;
  end

  assign rdata = mr ? mem[addr] : '0;

endmodule
