// flisp_bus: the processor's shared 8-bit data bus.
//
// Each source (registers A, R, X, Y, SP, PC, CC and the memory) reaches the
// bus through a driver with its own output enable, drawn in the processor as
// tri-state buffers. Here the bus is the OR of the enabled sources, which
// equals the tri-state bus whenever at most one driver is enabled, and reads
// zero when none is. conflict flags two or more enables at once, an illegal
// control word; the processor top asserts that it never happens.
module flisp_bus
  import flisp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]  oe,
  input  logic [DW-1:0] src [N],
  output logic [DW-1:0] bus,
  output logic          conflict
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++)
      if (oe[i]) bus |= src[i];
    conflict = (oe & (oe - N'(1))) != '0;   // two or more bits set
  end

endmodule
