// tri_state_buffer: connects one memory cell to the shared read bus.
//
// While enable is high, y follows x; otherwise y is released to high impedance
// so that another cell's buffer can drive the same bus. Every cell of the memory
// has one, and all their y outputs are tied to the memory's data_out. The
// alternative of OR-ing all cell outputs together is not used: it costs more
// logic and needs the unselected cells to output zero. The buffer is
// combinational; FPGA synthesis maps an internal tri-state bus to a multiplexer.
//
// Interface: enable, x[DATA_WIDTH-1:0] in; y[DATA_WIDTH-1:0] out (tri).
// The names enable and x come from the 4-byte memory schematic; y is chosen here.
module tri_state_buffer #(
  parameter int unsigned DATA_WIDTH = 8
) (
  input  logic                  enable,
  input  logic [DATA_WIDTH-1:0] x,
  output tri   [DATA_WIDTH-1:0] y
);

  assign y = enable ? x : 'z;

endmodule
