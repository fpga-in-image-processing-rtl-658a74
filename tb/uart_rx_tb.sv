// uart_rx_tb: drives 8N1 frames at CLKS_PER_BIT = 16 with random bytes and
// random idle gaps, plus short low glitches that must not be taken as start
// bits, and a frame whose bit period is 3% off. Each byte must be reported
// once with one rx_done pulse, within one bit period after the stop bit
// begins.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module uart_rx_tb;
  localparam int CPB = 16;
  logic clk = 0, rst = 1, rx = 1;
  logic rx_done;
  logic [7:0] rx_byte;
  logic [7:0] q[$];
  int checks = 0, failures = 0, done_count = 0, sent = 0;

  always #5 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rx, .rx_done, .rx_byte);

  task automatic send(logic [7:0] b, int cpb);
    rx = 0; repeat (cpb) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (cpb) @(posedge clk); end
    rx = 1; repeat (cpb) @(posedge clk);
    sent++;
  endtask

  always @(posedge clk) begin
    if (!rst && rx_done) begin
      done_count++;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected byte %h", rx_byte); end
      else begin
        automatic logic [7:0] e = q.pop_front();
        if (rx_byte != e) begin failures++; $display("FAIL byte %h expected %h", rx_byte, e); end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    repeat (10) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      if (n % 20 == 5) begin  // glitch shorter than half a bit
        rx = 0; repeat (CPB / 4) @(posedge clk); rx = 1; repeat (CPB) @(posedge clk);
      end
      q.push_back(b);
      send(b, (n % 25 == 7) ? CPB + CPB * 3 / 100 : CPB);
      repeat ($urandom_range(3)) @(posedge clk);
    end
    repeat (3 * CPB) @(posedge clk);
    checks++; if (done_count != sent || q.size() != 0) begin failures++; $display("FAIL %0d of %0d bytes", done_count, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
