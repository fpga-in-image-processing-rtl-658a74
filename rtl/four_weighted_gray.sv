// four_weighted_gray: weighted grayscale of the four pixels of a 128-bit word.
//
// Four weighted_gray instances side by side, one per pixel; gray[k] is the
// luminance of pixels[k]. Combinational. This is both the "Convert to Gray"
// block of the GLCM datapath and the four-pixel grayscale library module.
// Four parallel lanes and the coefficients follow the design; the packed
// word layout (pixel k in bits [32k+31:32k]) is this design's own choice.
module four_weighted_gray
  import imgproc_pkg::*;
(
  input  word4_t          pixels,
  output logic [3:0][7:0] gray
);
  for (genvar k = 0; k < 4; k++) begin : g_lane
    weighted_gray u_gray (
      .red  (pixels[k].red),
      .green(pixels[k].green),
      .blue (pixels[k].blue),
      .gray (gray[k])
    );
  end
endmodule
