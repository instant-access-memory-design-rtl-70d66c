// memory_cell: one word of the clockless two-dimensional memory.
//
// A cell is selected when both its row line and its column line are high. A
// selected cell stores data_in while Wr is high; the store is a level-sensitive
// latch, transparent for as long as the write lasts and holding its value once
// Wr, row or column drops. That latch is intended: the memory has no clock, and
// a write takes effect in the same instant the strobe and address arrive.
// data_out always carries the stored word; enable (Rd & row & column) tells the
// cell's tri-state buffer to put it on the shared read bus.
//
// Interface: Rd, Wr, row, column, data_in[DATA_WIDTH-1:0] in; data_out and
// enable out. Port names and the 8-bit default follow the 4-byte memory
// schematic. The latch, the always-visible data_out and the absence of a reset
// (contents are undefined until first written) are this design's choices.
module memory_cell #(
  parameter int unsigned DATA_WIDTH = 8
) (
  input  logic                  Rd,
  input  logic                  Wr,
  input  logic                  row,
  input  logic                  column,
  input  logic [DATA_WIDTH-1:0] data_in,
  output logic [DATA_WIDTH-1:0] data_out,
  output logic                  enable
);

  logic                  selected;
  logic [DATA_WIDTH-1:0] data;   // the cell's data register

  assign selected = row & column;

  always_latch begin
    if (Wr && selected) data = data_in;
  end

  assign data_out = data;
  assign enable   = Rd & selected;

endmodule
