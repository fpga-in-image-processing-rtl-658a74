// glcm_features_tb: streams random sparse matrices and compares the two
// accumulators with running sums computed in the testbench after every
// entry, and at the end of each matrix; clear restarts them. The third
// matrix uses entries up to 613120, the largest a 640x480 image can give
// (2 * 640 * 479), to exercise the full accumulator widths.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module glcm_features_tb;
  logic clk = 0, rst = 1, clear = 0, valid = 0;
  logic [7:0] i, j;
  logic [31:0] value;
  logic [47:0] contrast;
  logic [63:0] energy;
  longint exp_c, exp_e;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  glcm_features dut (.clk, .rst, .clear, .valid, .i, .j, .value, .contrast, .energy);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i = 0; j = 0; value = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int pass = 0; pass < 3; pass++) begin
      clear = 1; @(posedge clk); #1 clear = 0;
      exp_c = 0; exp_e = 0;
      for (int n = 0; n < 65536; n++) begin
        i = 8'(n >> 8); j = 8'(n);
        value = ($urandom_range(9) == 0) ? $urandom_range(pass == 0 ? 50 : pass == 1 ? 100000 : 613120) : 0;
        valid = ($urandom_range(7) != 0);
        if (valid) begin
          exp_c += longint'((int'(i) - int'(j)) * (int'(i) - int'(j))) * longint'(value);
          exp_e += longint'(value) * longint'(value);
        end
        @(posedge clk); #1;
        checks++;
        if (contrast != exp_c[47:0] || energy != exp_e) begin
          failures++;
          if (failures < 5) $display("FAIL after entry %0d: %0d %0d exp %0d %0d", n, contrast, energy, exp_c, exp_e);
        end
      end
      valid = 0;
      @(posedge clk); #1;
      checks += 2;
      if (contrast != exp_c[47:0]) begin failures++; $display("FAIL contrast %0d exp %0d", contrast, exp_c); end
      if (energy != exp_e) begin failures++; $display("FAIL energy %0d exp %0d", energy, exp_e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
