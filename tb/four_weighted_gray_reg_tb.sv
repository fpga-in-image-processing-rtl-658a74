// four_weighted_gray_reg_tb: results appear only after a load and stay
// unchanged while load is low and the pixels change; reset clears them.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module four_weighted_gray_reg_tb;
  import imgproc_pkg::*;
  logic clk = 0, rst = 1, load = 0;
  word4_t          px;
  logic [3:0][7:0] gray, held;
  int checks = 0, failures = 0, loads_seen = 0, holds_seen = 0;

  always #5 clk = ~clk;

  four_weighted_gray_reg dut (.clk, .rst, .load, .pixels(px), .gray(gray));

  function automatic logic [7:0] expect_gray(pixel_t p);
    return 8'((int'(p.red) * 306 + int'(p.green) * 601 + int'(p.blue) * 117 + 512) / 1024);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    px = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++; if (gray != '0) failures++;
    held = '0;
    for (int n = 0; n < 400; n++) begin
      for (int k = 0; k < 4; k++) px[k] = $urandom;
      load = ($urandom_range(2) == 0);
      @(posedge clk); #1;
      if (load) begin
        loads_seen++;
        for (int k = 0; k < 4; k++) held[k] = expect_gray(px[k]);
      end else holds_seen++;
      checks++;
      if (gray != held) begin
        failures++;
        $display("FAIL n=%0d load=%0d gray=%h expected %h", n, load, gray, held);
      end
    end
    load = 0;
    checks++; if (loads_seen == 0 || holds_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
