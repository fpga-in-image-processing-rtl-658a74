// uart_rx_aux128: packs received bytes into 128-bit DDR2 words.
//
// Each rx_done strobe from the UART receiver stores rx_byte in the next byte
// of a 128-bit buffer, the first byte in bits [7:0] and the sixteenth in bits
// [127:120]. The byte counter plays the role of the 8bits..128bits states.
// The clock edge that takes the sixteenth byte is the ResetCounters step:
// from that edge word holds the full buffer, word_valid is high for exactly
// one clock, and the counter is back at zero, ready for the next byte. word stays stable until the next sixteenth byte. Synchronous
// active-high reset.
// Collecting sixteen bytes into one 128-bit word follows the design; the
// byte order (first byte lowest) is this design's own choice, matching the
// host's pixel layout.
module uart_rx_aux128 (
  input  logic         clk,
  input  logic         rst,
  input  logic         rx_done,
  input  logic [7:0]   rx_byte,
  output logic         word_valid,
  output logic [127:0] word
);
  logic [3:0]        nbytes;
  logic [15:0][7:0]  buffer;

  always_ff @(posedge clk) begin
    if (rst) begin
      nbytes     <= '0;
      buffer     <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (rx_done) begin
        buffer[nbytes] <= rx_byte;
        nbytes         <= nbytes + 1'b1;   // wraps to 0: ResetCounters
        if (nbytes == 4'd15) begin
          word       <= {rx_byte, buffer[14:0]};
          word_valid <= 1'b1;
        end
      end
    end
  end
endmodule
