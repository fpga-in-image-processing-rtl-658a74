// bright_contrast: contrast gain and brightness offset with clamping.
//
// Each colour component c becomes c*contrast + bright, then is clamped to
// the range [LOW_REF, HIGH_REF]. contrast and bright are unsigned 8-bit
// inputs; the intermediate value needs 17 bits. The padding byte passes
// unchanged. Registered output with synchronous reset and enable, one clock
// of latency. The clamp limits are parameters (0 and 255 by default); the
// design only says that results beyond a low or high reference take the
// reference value.
module bright_contrast
  import imgproc_pkg::*;
#(
  parameter logic [7:0] LOW_REF  = 8'd0,
  parameter logic [7:0] HIGH_REF = 8'd255
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [7:0] contrast,
  input  logic [7:0] bright,
  input  pixel_t     pixel,
  output pixel_t     result
);
  function automatic logic [7:0] adjust(input logic [7:0] c, k, b);
    logic [16:0] v;
    v = 17'(c) * 17'(k) + 17'(b);
    if (v > 17'(HIGH_REF))      return HIGH_REF;
    else if (v < 17'(LOW_REF))  return LOW_REF;
    else                        return v[7:0];
  endfunction

  pixel_t nxt;
  always_comb begin
    nxt.pad   = pixel.pad;
    nxt.red   = adjust(pixel.red,   contrast, bright);
    nxt.green = adjust(pixel.green, contrast, bright);
    nxt.blue  = adjust(pixel.blue,  contrast, bright);
  end

  always_ff @(posedge clk) begin
    if (rst)     result <= '0;
    else if (en) result <= nxt;
  end
endmodule
