// horizontal_projection: number of white pixels in each image line.
//
// Pixels arrive four at a time with a one-cycle load strobe, in raster
// order. Each pixel goes through a weighted grayscale unit and a binarization
// against threshold; a result equal to 255 counts as one white pixel. The
// four flags are added to a line accumulator. A counter of load strobes marks
// the end of a line after IMG_WIDTH/4 strobes: on that strobe the line total
// (accumulator plus the last four flags) is latched into the outputs, split
// into count_hi = total / 256 and count_lo = total mod 256, available is high
// for one clock, and the accumulator restarts from zero for the next line.
// Timing: the outputs change on the clock edge that takes the last load of a
// line. Synchronous active-high reset. The accumulator and outputs are 11
// bits wide, enough for lines of up to 2047 pixels (the design targets up to
// 1920), so count_hi[7:3] are always zero. IMG_WIDTH must be a multiple
// of 4.
// The gray-binarize-count chain, the per-line counter and the hi/lo split
// follow the design; the 11-bit width and restarting at each line are this
// design's own choices.
module horizontal_projection
  import imgproc_pkg::*;
#(
  parameter int unsigned IMG_WIDTH = 640
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [7:0] threshold,
  input  word4_t     pixels,
  output logic [7:0] count_hi,
  output logic [7:0] count_lo,
  output logic       available
);
  localparam int unsigned LOADS_PER_LINE = IMG_WIDTH / 4;
  localparam int unsigned CW = $clog2(LOADS_PER_LINE + 1);

  logic [3:0][7:0] gray;
  logic [3:0][7:0] bin;
  logic [2:0]      ones;
  logic [10:0]     acc;
  logic [10:0]     total;
  logic [CW-1:0]   loads;
  logic [10:0]     line_count;

  four_weighted_gray u_gray (.pixels(pixels), .gray(gray));

  for (genvar k = 0; k < 4; k++) begin : g_bin
    binarization u_bin (.color(gray[k]), .ref_val(threshold), .out_val(bin[k]));
  end

  always_comb begin
    ones = '0;
    for (int k = 0; k < 4; k++) ones += 3'(bin[k] == 8'd255);
    total = acc + 11'(ones);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc        <= '0;
      loads      <= '0;
      line_count <= '0;
      available  <= 1'b0;
    end else begin
      available <= 1'b0;
      if (load) begin
        if (loads == CW'(LOADS_PER_LINE - 1)) begin
          line_count <= total;
          available  <= 1'b1;
          acc        <= '0;
          loads      <= '0;
        end else begin
          acc   <= total;
          loads <= loads + 1'b1;
        end
      end
    end
  end

  assign count_hi = {5'd0, line_count[10:8]};
  assign count_lo = line_count[7:0];
endmodule
