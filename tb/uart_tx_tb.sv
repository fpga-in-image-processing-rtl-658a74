// uart_tx_tb: sends random bytes at CLKS_PER_BIT = 12 and decodes the line
// by sampling in the middle of each bit: start bit low, eight data bits LSB
// first, stop bit high. Checks busy, the single tx_done pulse and the byte
// time of 10*CLKS_PER_BIT + 2 clocks from start to tx_done.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module uart_tx_tb;
  localparam int CPB = 12;
  logic clk = 0, rst = 1, start = 0;
  logic [7:0] tx_byte;
  logic tx, busy, tx_done;
  int checks = 0, failures = 0;
  int cyc = 0, t_start = 0, t_done = 0;

  // clock count of the edge that takes start and of the edge that sees tx_done
  always @(posedge clk) begin
    if (start) t_start = cyc;
    if (tx_done) t_done = cyc;
    cyc++;
  end

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .start, .tx_byte, .tx, .busy, .tx_done);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx_byte = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (3) @(posedge clk); #1;
    checks++; if (tx !== 1'b1 || busy) failures++;
    for (int n = 0; n < 100; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic logic [7:0] got;
      automatic int cycles = 0;
      tx_byte = b; start = 1;
      @(posedge clk); #1 start = 0; tx_byte = ~b;
      checks++; if (!busy) failures++;
      // find the start bit edge
      while (tx) begin @(posedge clk); #1; cycles++; end
      repeat (CPB / 2) begin @(posedge clk); cycles++; end
      #1 checks++; if (tx !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) begin @(posedge clk); cycles++; end
        #1 got[i] = tx;
      end
      repeat (CPB) begin @(posedge clk); cycles++; end
      #1 checks++; if (tx !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      checks++; if (got != b) begin failures++; $display("FAIL sent %h decoded %h", b, got); end
      while (!tx_done) begin @(posedge clk); #1; cycles++; end
      checks++;
      @(posedge clk); #1;
      if (t_done - t_start != 10 * CPB + 2) begin failures++; $display("FAIL byte took %0d clocks n=%0d ts=%0d td=%0d", t_done - t_start, n, t_start, t_done); end
      checks++; if (tx_done || busy) failures++;
      repeat ($urandom_range(3)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
