// negative: per-component distance from a reference value.
//
// Each colour component c of the pixel becomes |ref_val - c|: the larger
// operand is always the minuend, so the result is never negative. With
// ref_val = 255 this is the photographic negative. The padding byte is
// passed on unchanged. Registered output with synchronous reset and enable,
// one clock of latency.
// The |ref - c| rule follows the design; keeping the padding byte and the
// reset value are this design's own choices.
module negative
  import imgproc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [7:0] ref_val,
  input  pixel_t     pixel,
  output pixel_t     result
);
  function automatic logic [7:0] absdiff(input logic [7:0] a, b);
    return (a > b) ? a - b : b - a;
  endfunction

  pixel_t nxt;
  always_comb begin
    nxt.pad   = pixel.pad;
    nxt.red   = absdiff(ref_val, pixel.red);
    nxt.green = absdiff(ref_val, pixel.green);
    nxt.blue  = absdiff(ref_val, pixel.blue);
  end

  always_ff @(posedge clk) begin
    if (rst)     result <= '0;
    else if (en) result <= nxt;
  end
endmodule
