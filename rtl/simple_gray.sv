// simple_gray: unweighted grayscale, the mean of R, G and B.
//
// Division by 3 is replaced by a multiply and shift:
// result = ((R+G+B)*683 + 1024) / 2048, with 683/2048 ~ 1/3 and 1024 for
// rounding. R+G+B needs 10 bits, the product 20 bits. Registered output with
// synchronous reset and enable, one clock of latency.
// The formula follows the design; the reset value and the packed ports are
// this design's own choices.
module simple_gray
  import imgproc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  pixel_t     pixel,
  output logic [7:0] result
);
  logic [9:0]  sum3;
  logic [19:0] scaled;

  always_comb begin
    sum3   = 10'(pixel.red) + 10'(pixel.green) + 10'(pixel.blue);
    scaled = 20'(sum3) * 20'd683 + 20'd1024;
  end

  always_ff @(posedge clk) begin
    if (rst)     result <= '0;
    else if (en) result <= scaled[18:11];
  end
endmodule
