// weighted_gray: luminance of one RGB pixel.
//
// Gray = (R*306 + G*601 + B*117 + 512) / 1024, the integer form of
// 0.299R + 0.587G + 0.114B with rounding: the coefficients are scaled by 1024,
// 512 is added for rounding and the division is a 10-bit right shift. The
// three products are 17, 18 and 15 bits wide and their sum 18 bits; the
// maximum, 255*1024 + 512, fits 18 bits so no saturation is needed.
// Purely combinational: gray follows the inputs in the same cycle.
// The coefficients and structure follow the design; keeping the block
// combinational (so four copies can sit inside other modules) is a choice.
module weighted_gray #(
  parameter int unsigned R_COEF = 306,
  parameter int unsigned G_COEF = 601,
  parameter int unsigned B_COEF = 117,
  parameter int unsigned ROUND  = 512
) (
  input  logic [7:0] red,
  input  logic [7:0] green,
  input  logic [7:0] blue,
  output logic [7:0] gray
);
  logic [16:0] prod_r;
  logic [17:0] prod_g;
  logic [14:0] prod_b;
  logic [17:0] sum;

  always_comb begin
    prod_r = 17'(red)   * 17'(R_COEF);
    prod_g = 18'(green) * 18'(G_COEF);
    prod_b = 15'(blue)  * 15'(B_COEF);
    sum    = 18'(prod_r) + prod_g + 18'(prod_b) + 18'(ROUND);
    gray   = sum[17:10];
  end
endmodule
