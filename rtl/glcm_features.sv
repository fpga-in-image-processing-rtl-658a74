// glcm_features: contrast and energy of a gray-level co-occurrence matrix.
//
// The matrix is streamed one entry per clock: value = M(i,j) with its row i
// and column j, qualified by valid. Two accumulators are updated on each
// valid entry:
//   contrast += (i-j)^2 * M(i,j)
//   energy   += M(i,j)^2
// clear zeroes both (synchronous, takes priority over valid). The sums are
// not divided by the number of pairs; a host normalises them if needed.
// Results are available the clock after the last entry. Accumulator widths
// (48 and 64 bits) hold the sums of a 640x480 image with a wide margin.
// The two formulas follow the design; leaving out the division and the
// accumulator widths are this design's own choices.
module glcm_features (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        valid,
  input  logic [7:0]  i,
  input  logic [7:0]  j,
  input  logic [31:0] value,
  output logic [47:0] contrast,
  output logic [63:0] energy
);
  logic [7:0]  diff;
  logic [15:0] diff_sq;

  always_comb begin
    diff    = (i > j) ? i - j : j - i;
    diff_sq = 16'(diff) * 16'(diff);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      contrast <= '0;
      energy   <= '0;
    end else if (valid) begin
      contrast <= contrast + 48'(diff_sq) * 48'(value);
      energy   <= energy + 64'(value) * 64'(value);
    end
  end
endmodule
