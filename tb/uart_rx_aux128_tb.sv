// uart_rx_aux128_tb: feeds byte strobes with random gaps (including
// back-to-back strobes) and checks that every sixteen bytes give one
// word_valid pulse, in the clock right after the sixteenth strobe, with byte n in bits [8n+7:8n], and that the word is
// stable between pulses.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module uart_rx_aux128_tb;
  logic clk = 0, rst = 1, rx_done = 0;
  logic [7:0] rx_byte;
  logic word_valid;
  logic [127:0] word, expect_word, last_word;
  int checks = 0, failures = 0, words = 0;

  always #5 clk = ~clk;

  uart_rx_aux128 dut (.clk, .rst, .rx_done, .rx_byte, .word_valid, .word);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx_byte = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int w = 0; w < 50; w++) begin
      for (int n = 0; n < 16; n++) begin
        rx_byte = 8'($urandom);
        expect_word[8 * n +: 8] = rx_byte;
        rx_done = 1;
        @(posedge clk); #1;
        rx_done = 0;
        checks++;
        if (word_valid != (n == 15)) begin failures++; $display("FAIL word_valid=%0d at w=%0d n=%0d", word_valid, w, n); end
        if (n != 15) begin
          repeat ($urandom_range(2)) begin
            @(posedge clk); #1;
            checks++; if (w > 0 && word != last_word) begin failures++; $display("FAIL word changed"); end
          end
        end
      end
      checks++;
      if (!word_valid || word != expect_word) begin
        failures++;
        $display("FAIL w=%0d valid=%0d word=%h expected %h", w, word_valid, word, expect_word);
      end
      last_word = word;
      words++;
      @(posedge clk); #1;
      checks++; if (word_valid) begin failures++; $display("FAIL word_valid longer than one clock"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
