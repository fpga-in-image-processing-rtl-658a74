// uart_tx_aux128_tb: offers 128-bit words with the four-phase handshake to
// the helper connected to a real uart_tx (CLKS_PER_BIT = 4) and decodes the
// serial line; each word must come out as sixteen bytes, bits [7:0] first,
// and ack must fall only after the last byte has been sent.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module uart_tx_aux128_tb;
  localparam int CPB = 4;
  logic clk = 0, rst = 1, req = 0;
  logic ack, tx_start, tx_done, tx, busy;
  logic [7:0] tx_byte;
  logic [127:0] word;
  logic [7:0] q[$];
  int checks = 0, failures = 0, bytes_rx = 0, bytes_exp = 0;

  always #5 clk = ~clk;

  uart_tx_aux128 dut (.clk, .rst, .req, .ack, .word, .tx_start, .tx_byte, .tx_done);
  uart_tx #(.CLKS_PER_BIT(CPB)) u_tx (.clk, .rst, .start(tx_start), .tx_byte, .tx, .busy, .tx_done);

  // serial line decoder
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      bytes_rx++;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL extra byte %h", b); end
      else begin
        automatic logic [7:0] e = q.pop_front();
        if (b != e) begin failures++; $display("FAIL byte %h expected %h", b, e); end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int w = 0; w < 8; w++) begin
      word = {$urandom, $urandom, $urandom, $urandom};
      for (int n = 0; n < 16; n++) q.push_back(word[8 * n +: 8]);
      bytes_exp += 16;
      req = 1;
      while (!ack) begin @(posedge clk); #1; end
      req = 0;
      word = ~word;   // the helper must have its own copy
      while (ack) begin @(posedge clk); #1; end
      checks++;
      if (busy || q.size() > 0 && bytes_rx < bytes_exp - 1) begin
        failures++; $display("FAIL ack fell before the word was sent (%0d of %0d)", bytes_rx, bytes_exp);
      end
      repeat ($urandom_range(5)) @(posedge clk);
      #1;
    end
    repeat (20 * CPB) @(posedge clk);
    checks++; if (bytes_rx != bytes_exp) begin failures++; $display("FAIL %0d bytes of %0d", bytes_rx, bytes_exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
