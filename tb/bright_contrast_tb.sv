// bright_contrast_tb: each component becomes min(255, c*contrast+bright),
// checked on random inputs and on the reference-simulation values
// (contrast 2, bright 64: 10->84, 50->164, 100->255, 30->124, 20->104,
// 0->64). A second instance with clamping limits 16..235 checks both limits.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module bright_contrast_tb;
  import imgproc_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [7:0] contrast, bright;
  pixel_t px, res, res2;
  int checks = 0, failures = 0, clamps_hi = 0, clamps_lo = 0;

  always #5 clk = ~clk;

  bright_contrast dut (.clk, .rst, .en, .contrast, .bright, .pixel(px), .result(res));
  bright_contrast #(.LOW_REF(8'd16), .HIGH_REF(8'd235)) dut2 (
    .clk, .rst, .en, .contrast, .bright, .pixel(px), .result(res2));

  function automatic logic [7:0] adj(int c, int k, int b, int lo, int hi);
    int v = c * k + b;
    if (v > hi) return 8'(hi);
    if (v < lo) return 8'(lo);
    return 8'(v);
  endfunction

  task automatic apply(logic [7:0] k, logic [7:0] b, pixel_t p);
    pixel_t e, e2;
    contrast = k; bright = b; px = p; en = 1;
    @(posedge clk); #1;
    e  = '{pad: p.pad, red: adj(p.red, k, b, 0, 255),   green: adj(p.green, k, b, 0, 255),   blue: adj(p.blue, k, b, 0, 255)};
    e2 = '{pad: p.pad, red: adj(p.red, k, b, 16, 235),  green: adj(p.green, k, b, 16, 235),  blue: adj(p.blue, k, b, 16, 235)};
    checks += 2;
    if (res !== e)   begin failures++; $display("FAIL k=%0d b=%0d px=%h res=%h exp %h", k, b, p, res, e); end
    if (res2 !== e2) begin failures++; $display("FAIL(16..235) k=%0d b=%0d px=%h res=%h exp %h", k, b, p, res2, e2); end
    if (int'(p.red) * k + b > 235) clamps_hi++;
    if (int'(p.red) * k + b < 16)  clamps_lo++;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    contrast = 0; bright = 0; px = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    apply(8'd2, 8'd64, '{pad: 8'h30, red: 8'd100, green: 8'd50, blue: 8'd10});
    checks++; if (res.blue != 8'd84 || res.green != 8'd164 || res.red != 8'd255) failures++;
    apply(8'd2, 8'd64, '{pad: 8'h30, red: 8'd20, green: 8'd30, blue: 8'd50});
    checks++; if (res.red != 8'd104 || res.green != 8'd124 || res.blue != 8'd164) failures++;
    apply(8'd2, 8'd64, '0);
    checks++; if (res.red != 8'd64) failures++;
    for (int n = 0; n < 500; n++)
      apply(8'($urandom_range(4)), 8'($urandom_range(80)), pixel_t'($urandom));
    checks++; if (clamps_hi == 0 || clamps_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
