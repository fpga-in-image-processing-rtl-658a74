// weighted_gray_tb: checks the weighted grayscale against the integer
// formula on every value of each component and on random pixels, against
// the rounded real-valued luminance 0.299R + 0.587G + 0.114B (within 1),
// and against the two values of the reference simulation.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module weighted_gray_tb;
  logic [7:0] r, g, b, gray;
  int checks = 0, failures = 0;

  weighted_gray dut (.red(r), .green(g), .blue(b), .gray(gray));

  function automatic int expect_gray(int rr, int gg, int bb);
    return (rr * 306 + gg * 601 + bb * 117 + 512) / 1024;
  endfunction

  task automatic try(int rr, int gg, int bb);
    real lum;
    r = 8'(rr); g = 8'(gg); b = 8'(bb);
    #1;
    checks++;
    if (int'(gray) != expect_gray(rr, gg, bb)) begin
      failures++;
      $display("FAIL rgb=(%0d,%0d,%0d) gray=%0d expected %0d", rr, gg, bb, gray, expect_gray(rr, gg, bb));
    end
    lum = 0.299 * rr + 0.587 * gg + 0.114 * bb;
    checks++;
    if ((real'(gray) - lum) > 1.0 || (lum - real'(gray)) > 1.0) begin
      failures++;
      $display("FAIL rgb=(%0d,%0d,%0d) gray=%0d far from %f", rr, gg, bb, gray, lum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reference simulation values
    try(20, 100, 15); checks++; if (gray != 8'd66) failures++;
    try(4, 16, 10);   checks++; if (gray != 8'd12) failures++;
    try(255, 255, 255); checks++; if (gray != 8'd255) failures++;
    try(0, 0, 0);     checks++; if (gray != 8'd0) failures++;
    for (int v = 0; v < 256; v++) begin
      try(v, 0, 0); try(0, v, 0); try(0, 0, v); try(v, v, v);
    end
    for (int n = 0; n < 2000; n++) try($urandom_range(255), $urandom_range(255), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
