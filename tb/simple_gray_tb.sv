// simple_gray_tb: result is ((R+G+B)*683+1024)/2048, within one of the
// true mean (R+G+B)/3, one clock after en; reference-simulation values
// (20,100,15)->45, (4,16,10)->10, (1,1,1)->1.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module simple_gray_tb;
  import imgproc_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  pixel_t px;
  logic [7:0] res;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  simple_gray dut (.clk, .rst, .en, .pixel(px), .result(res));

  task automatic apply(int r, int g, int b);
    int e;
    real mean;
    px = '{pad: 8'h30, red: 8'(r), green: 8'(g), blue: 8'(b)}; en = 1;
    @(posedge clk); #1;
    e = ((r + g + b) * 683 + 1024) / 2048;
    mean = (r + g + b) / 3.0;
    checks += 2;
    if (int'(res) != e) begin failures++; $display("FAIL (%0d,%0d,%0d) res=%0d exp %0d", r, g, b, res, e); end
    if (real'(res) - mean > 1.0 || mean - real'(res) > 1.0) begin failures++; $display("FAIL mean"); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    px = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    apply(20, 100, 15); checks++; if (res != 8'd45) failures++;
    apply(4, 16, 10);   checks++; if (res != 8'd10) failures++;
    apply(1, 1, 1);     checks++; if (res != 8'd1) failures++;
    apply(255, 255, 255); checks++; if (res != 8'd255) failures++;
    for (int n = 0; n < 1000; n++) apply($urandom_range(255), $urandom_range(255), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
