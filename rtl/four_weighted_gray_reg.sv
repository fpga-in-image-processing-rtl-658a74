// four_weighted_gray_reg: four weighted grayscales held in output registers.
//
// The four luminance values are computed continuously; when load is high on
// a rising clock edge they are copied into four 8-bit registers that drive
// gray. While load is low the registers keep their value whatever the pixel
// inputs do. Synchronous active-high reset clears the registers to 0 (the
// reset value is this design's choice).
module four_weighted_gray_reg
  import imgproc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            load,
  input  word4_t          pixels,
  output logic [3:0][7:0] gray
);
  logic [3:0][7:0] gray_now;

  four_weighted_gray u_gray (.pixels(pixels), .gray(gray_now));

  always_ff @(posedge clk) begin
    if (rst)       gray <= '0;
    else if (load) gray <= gray_now;
  end
endmodule
