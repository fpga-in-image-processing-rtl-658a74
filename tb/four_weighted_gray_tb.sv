// four_weighted_gray_tb: four pixels at once, each lane against the integer
// weighted grayscale formula, with distinct random pixels per lane so that
// a swapped or shared lane shows.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module four_weighted_gray_tb;
  import imgproc_pkg::*;
  word4_t          px;
  logic [3:0][7:0] gray;
  int checks = 0, failures = 0;

  four_weighted_gray dut (.pixels(px), .gray(gray));

  function automatic int expect_gray(pixel_t p);
    return (int'(p.red) * 306 + int'(p.green) * 601 + int'(p.blue) * 117 + 512) / 1024;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int k = 0; k < 4; k++) px[k] = $urandom;
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(gray[k]) != expect_gray(px[k])) begin
          failures++;
          $display("FAIL lane %0d pixel %h gray %0d expected %0d", k, px[k], gray[k], expect_gray(px[k]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
