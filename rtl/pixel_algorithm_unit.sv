// pixel_algorithm_unit: the per-pixel image processing library, four lanes.
//
// Takes the four pixels of one 128-bit DDR2 word and applies the algorithm
// chosen by alg to each of them: red channel, green channel, negative,
// bright and contrast, simple grayscale, weighted grayscale (four separate
// weighted_gray units), binarization of the weighted grayscale, the
// four-pixel grayscale module, and the four-pixel grayscale with output
// register. A one-clock en pulse starts a word; word_out holds the result
// from the clock after en until the next en. Algorithms with a single 8-bit
// result write it to the blue, green and red bytes of the pixel so that the
// output is a gray image; the padding byte of each pixel is kept. For alg
// values that are not pixel algorithms (horizontal projection, GLCM) the
// word is passed on unchanged. Having every algorithm present behind one
// selector is this design's choice; the per-algorithm behaviour follows the
// library modules.
module pixel_algorithm_unit
  import imgproc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  alg_e       alg,
  input  logic [7:0] ref_val,     // negative reference
  input  logic [7:0] contrast,
  input  logic [7:0] bright,
  input  logic [7:0] threshold,   // binarization reference
  input  word4_t     word_in,
  output word4_t     word_out
);
  logic [3:0][7:0] red_r, green_r, sgray_r, wgray_c, wgray_r, bin_c, bin_r, fgray_c, fgray_r, fgreg;
  word4_t          neg_r, bc_r, pass_r;

  function automatic pixel_t gray_pixel(input logic [7:0] g, input logic [7:0] pad);
    return '{pad: pad, red: g, green: g, blue: g};
  endfunction

  for (genvar k = 0; k < 4; k++) begin : g_lane
    channel_select #(.CHANNEL(CH_RED)) u_red (
      .clk, .rst, .en, .pixel(word_in[k]), .result(red_r[k]));
    channel_select #(.CHANNEL(CH_GREEN)) u_green (
      .clk, .rst, .en, .pixel(word_in[k]), .result(green_r[k]));
    negative u_neg (
      .clk, .rst, .en, .ref_val, .pixel(word_in[k]), .result(neg_r[k]));
    bright_contrast u_bc (
      .clk, .rst, .en, .contrast, .bright, .pixel(word_in[k]), .result(bc_r[k]));
    simple_gray u_sgray (
      .clk, .rst, .en, .pixel(word_in[k]), .result(sgray_r[k]));
    weighted_gray u_wgray (
      .red(word_in[k].red), .green(word_in[k].green), .blue(word_in[k].blue),
      .gray(wgray_c[k]));
    binarization u_bin (.color(wgray_c[k]), .ref_val(threshold), .out_val(bin_c[k]));
  end

  four_weighted_gray     u_four  (.pixels(word_in), .gray(fgray_c));
  four_weighted_gray_reg u_fgreg (.clk, .rst, .load(en), .pixels(word_in), .gray(fgreg));

  // Output registers for the combinational library modules.
  always_ff @(posedge clk) begin
    if (rst) begin
      wgray_r <= '0;
      bin_r   <= '0;
      fgray_r <= '0;
      pass_r  <= '0;
    end else if (en) begin
      wgray_r <= wgray_c;
      bin_r   <= bin_c;
      fgray_r <= fgray_c;
      pass_r  <= word_in;
    end
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      unique case (alg)
        ALG_RED_CHANNEL:     word_out[k] = gray_pixel(red_r[k],   pass_r[k].pad);
        ALG_GREEN_CHANNEL:   word_out[k] = gray_pixel(green_r[k], pass_r[k].pad);
        ALG_NEGATIVE:        word_out[k] = neg_r[k];
        ALG_BRIGHT_CONTRAST: word_out[k] = bc_r[k];
        ALG_SIMPLE_GRAY:     word_out[k] = gray_pixel(sgray_r[k], pass_r[k].pad);
        ALG_WEIGHTED_GRAY:   word_out[k] = gray_pixel(wgray_r[k], pass_r[k].pad);
        ALG_BINARIZATION:    word_out[k] = gray_pixel(bin_r[k],   pass_r[k].pad);
        ALG_FOUR_GRAY:       word_out[k] = gray_pixel(fgray_r[k], pass_r[k].pad);
        ALG_FOUR_GRAY_REG:   word_out[k] = gray_pixel(fgreg[k],   pass_r[k].pad);
        default:             word_out[k] = pass_r[k];
      endcase
    end
  end
endmodule
