// channel_select_tb: red and green channel instances; the result is the
// chosen component one clock after the pixel, holds while en is low and
// is 0 after reset. Includes the value pairs of the reference simulations.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module channel_select_tb;
  import imgproc_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  pixel_t px;
  logic [7:0] red_out, green_out, exp_r, exp_g;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  channel_select #(.CHANNEL(CH_RED))   u_red   (.clk, .rst, .en, .pixel(px), .result(red_out));
  channel_select #(.CHANNEL(CH_GREEN)) u_green (.clk, .rst, .en, .pixel(px), .result(green_out));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    px = '{pad: 8'h30, red: 8'd100, green: 8'd50, blue: 8'd10};
    repeat (2) @(posedge clk);
    #1;
    checks++; if (red_out != 0 || green_out != 0) failures++;
    rst = 0; en = 1;
    exp_r = 0; exp_g = 0;
    for (int n = 0; n < 300; n++) begin
      if (n > 0) begin
        px = $urandom;
        en = ($urandom_range(3) != 0);
      end
      @(posedge clk); #1;
      if (en) begin exp_r = px.red; exp_g = px.green; end
      checks += 2;
      if (red_out != exp_r)   begin failures++; $display("FAIL red %0d != %0d", red_out, exp_r); end
      if (green_out != exp_g) begin failures++; $display("FAIL green %0d != %0d", green_out, exp_g); end
    end
    rst = 1; @(posedge clk); #1;
    checks++; if (red_out != 0 || green_out != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
