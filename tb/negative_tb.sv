// negative_tb: each component becomes |ref - c| one clock after en, with
// random references and pixels, plus the reference-simulation values
// (ref 255: 10->245, 50->205, 100->155; 0 -> 255).
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module negative_tb;
  import imgproc_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [7:0] ref_val;
  pixel_t px, res, exp_px;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  negative dut (.clk, .rst, .en, .ref_val, .pixel(px), .result(res));

  function automatic logic [7:0] absd(int a, int b);
    return 8'((a > b) ? a - b : b - a);
  endfunction

  task automatic apply(logic [7:0] rv, pixel_t p);
    ref_val = rv; px = p; en = 1;
    @(posedge clk); #1;
    exp_px = '{pad: p.pad, red: absd(rv, p.red), green: absd(rv, p.green), blue: absd(rv, p.blue)};
    checks++;
    if (res !== exp_px) begin
      failures++;
      $display("FAIL ref=%0d px=%h res=%h expected %h", rv, p, res, exp_px);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_val = 0; px = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    apply(8'd255, '{pad: 8'h30, red: 8'd100, green: 8'd50, blue: 8'd10});
    checks++; if (res.blue != 8'd245 || res.green != 8'd205 || res.red != 8'd155) failures++;
    apply(8'd255, '{pad: 8'h30, red: 8'd0, green: 8'd0, blue: 8'd0});
    checks++; if (res.red != 8'd255) failures++;
    for (int n = 0; n < 500; n++) apply(8'($urandom), pixel_t'($urandom));
    // hold while en is low
    en = 0; exp_px = res; px = ~px;
    repeat (3) @(posedge clk); #1;
    checks++; if (res !== exp_px) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
