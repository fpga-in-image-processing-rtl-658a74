// horizontal_projection_tb: at the default width of 640 pixels, streams
// lines of random pixels (with idle gaps between loads) and compares each
// reported line count with the number of pixels whose weighted grayscale
// is above the threshold. Also checks that exactly one available pulse
// comes per line, on the last load of the line, and that the count is split
// into count_hi/count_lo. One line is all white (640, so count_hi is 2).
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module horizontal_projection_tb;
  import imgproc_pkg::*;
  localparam int W = 640;
  localparam int LINES = 6;
  logic clk = 0, rst = 1, load = 0;
  logic [7:0] threshold, hi, lo;
  word4_t px;
  logic available;
  int checks = 0, failures = 0, expected[LINES], got = 0, avail_pulses = 0;

  always #5 clk = ~clk;

  horizontal_projection #(.IMG_WIDTH(W)) dut (
    .clk, .rst, .load, .threshold, .pixels(px), .count_hi(hi), .count_lo(lo), .available);

  function automatic int g(pixel_t p);
    return (int'(p.red) * 306 + int'(p.green) * 601 + int'(p.blue) * 117 + 512) / 1024;
  endfunction

  always @(posedge clk) if (!rst && available) avail_pulses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    threshold = 8'd127; px = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int l = 0; l < LINES; l++) begin
      expected[l] = 0;
      for (int w = 0; w < W / 4; w++) begin
        for (int k = 0; k < 4; k++) begin
          px[k] = (l == 2) ? 32'h30FFFFFF : $urandom;
          if (g(px[k]) > 127) expected[l]++;
        end
        load = 1;
        @(posedge clk); #1;
        load = 0;
        checks++;
        if (available != (w == W / 4 - 1)) begin failures++; $display("FAIL available at line %0d word %0d", l, w); end
        if (available) begin
          checks++;
          if (int'(hi) * 256 + int'(lo) != expected[l] || lo != 8'(expected[l]) || int'(hi) != expected[l] / 256) begin
            failures++;
            $display("FAIL line %0d count %0d expected %0d", l, int'(hi) * 256 + int'(lo), expected[l]);
          end
          got++;
        end
        repeat ($urandom_range(2)) @(posedge clk);
        #1;
      end
    end
    repeat (2) @(posedge clk);
    checks++; if (got != LINES || avail_pulses != LINES) begin failures++; $display("FAIL %0d/%0d pulses", got, avail_pulses); end
    checks++; if (expected[2] != 640) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
