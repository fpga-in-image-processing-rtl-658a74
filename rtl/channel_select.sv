// channel_select: red channel / green channel component.
//
// Outputs one colour component of the pixel, chosen by the CHANNEL parameter
// (CH_RED for the red channel component, CH_GREEN for the green one). Like
// the code generated from the Petri net models, the result is a register:
// a synchronous reset clears it to 0 and it is updated on every rising edge
// while en (the model's enable) is high, so result lags the pixel by one
// clock.
// The channel choice and the register behaviour follow the design's models;
// making the channel a parameter of one module is this design's own choice.
module channel_select
  import imgproc_pkg::*;
#(
  parameter channel_e CHANNEL = CH_RED
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  pixel_t     pixel,
  output logic [7:0] result
);
  logic [7:0] picked;

  always_comb begin
    unique case (CHANNEL)
      CH_RED:   picked = pixel.red;
      CH_GREEN: picked = pixel.green;
      default:  picked = pixel.blue;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)     result <= '0;
    else if (en) result <= picked;
  end
endmodule
