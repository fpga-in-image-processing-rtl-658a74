// binarization: threshold one 8-bit value.
//
// out_val is 255 (white) when color is above ref_val and 0 (black) when it
// is equal or below. Combinational, so it can be chained after a grayscale
// unit inside the horizontal projection.
// The rule (white above the reference, black otherwise) and the 8-bit
// values follow the design; the port names are this design's own.
module binarization (
  input  logic [7:0] color,
  input  logic [7:0] ref_val,
  output logic [7:0] out_val
);
  always_comb out_val = (color <= ref_val) ? 8'd0 : 8'd255;
endmodule
