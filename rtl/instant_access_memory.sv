// instant_access_memory: a clockless two-dimensional memory of 2**ADDR_WIDTH
// words of DATA_WIDTH bits.
//
// The words sit in a grid of ROWS x COLS memory cells. The upper ROW_BITS bits
// of addr go to the row decoder and the lower COL_BITS bits to the column
// decoder; each turns its field into one-hot select lines, and the single cell
// where the active row meets the active column is the one addressed, so cell
// number i holds address i. With Wr high that cell's latch takes data_in; with
// Rd high the cell enables its tri-state buffer and its word appears on
// data_out. All cell buffers share data_out, which floats when nothing is read.
//
// Timing: there is no clock. A write is stored, and a read is visible on
// data_out, as soon as the strobe, address and data have propagated through the
// decoders and one cell: combinational delay only. Keep addr and data_in stable
// while Wr is high, as for any asynchronous latch-based RAM; a glitch on addr
// during a write can store into a neighbouring cell.
//
// Interface: Rd, Wr, addr[ADDR_WIDTH-1:0], data_in[DATA_WIDTH-1:0] in;
// data_out[DATA_WIDTH-1:0] out (tri).
//
// What follows the source design: the row and column decoders, one memory cell
// and one tri-state buffer per word built with generate loops, the clockless
// operation, the 16 x 8-bit default size and the port names; with ADDR_WIDTH=2
// it is the 4-byte memory whose column decoder takes addr[0] and row decoder
// addr[1]. This design's own choices: for wider addresses the row gets the
// upper floor(ADDR_WIDTH/2) bits, there is no reset, and Rd with Wr together
// reads the word being written.
//
// Lint notes: the cell latches and the several drivers of data_out are the
// intended structure of this memory, not accidents.
module instant_access_memory #(
  parameter int unsigned ADDR_WIDTH = 4,
  parameter int unsigned DATA_WIDTH = 8
) (
  input  logic                  Rd,
  input  logic                  Wr,
  input  logic [ADDR_WIDTH-1:0] addr,
  input  logic [DATA_WIDTH-1:0] data_in,
  output tri   [DATA_WIDTH-1:0] data_out
);

  localparam int unsigned ROW_BITS = ADDR_WIDTH / 2;
  localparam int unsigned COL_BITS = ADDR_WIDTH - ROW_BITS;
  localparam int unsigned ROWS     = 2 ** ROW_BITS;
  localparam int unsigned COLS     = 2 ** COL_BITS;
  localparam int unsigned WORDS    = ROWS * COLS;

  logic [ROWS-1:0]  row_sel;
  logic [COLS-1:0]  col_sel;
  logic [WORDS-1:0] cell_enable;

  decoder #(.IN_WIDTH(COL_BITS)) C1 (
    .a (addr[COL_BITS-1:0]),
    .b (col_sel)
  );

  decoder #(.IN_WIDTH(ROW_BITS)) R1 (
    .a (addr[ADDR_WIDTH-1:COL_BITS]),
    .b (row_sel)
  );

  for (genvar i = 0; i < WORDS; i++) begin : x
    logic [DATA_WIDTH-1:0] cell_data;

    memory_cell #(.DATA_WIDTH(DATA_WIDTH)) B0 (
      .Rd       (Rd),
      .Wr       (Wr),
      .row      (row_sel[i / COLS]),
      .column   (col_sel[i % COLS]),
      .data_in  (data_in),
      .data_out (cell_data),
      .enable   (cell_enable[i])
    );

    tri_state_buffer #(.DATA_WIDTH(DATA_WIDTH)) T0 (
      .enable (cell_enable[i]),
      .x      (cell_data),
      .y      (data_out)
    );
  end

  // Bus rule: at most one cell may drive data_out at a time.
  always_comb begin
    assert ((cell_enable & (cell_enable - 1'b1)) == '0)
      else $error("instant_access_memory: several cells drive data_out (enables %b)", cell_enable);
  end

  initial begin
    assert (ADDR_WIDTH >= 2)
      else $fatal(1, "instant_access_memory: ADDR_WIDTH must be at least 2 (one row and one column bit)");
  end

endmodule
