// decoder: binary to one-hot decoder for one address field.
//
// The two-dimensional memory splits its address into a row field and a column
// field and decodes each with one of these; output b[k] is high exactly when
// the input a equals k. It is purely combinational: the outputs follow the
// input with gate delay only, there is no clock, enable or reset.
//
// Interface: a[IN_WIDTH-1:0] in, b[2**IN_WIDTH-1:0] out. The port names and the
// 1-to-2 default size are those of the 4-byte memory schematic; the lack of an
// enable input is this design's choice.
module decoder #(
  parameter int unsigned IN_WIDTH = 1
) (
  input  logic [IN_WIDTH-1:0]      a,
  output logic [(2**IN_WIDTH)-1:0] b
);

  always_comb begin
    b = '0;
    b[a] = 1'b1;
  end

endmodule
