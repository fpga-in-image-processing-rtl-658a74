// uart_tx_aux128: sends a 128-bit word as sixteen UART bytes.
//
// The controller offers a word with a four-phase handshake: it raises req
// with word stable; in Idle the module copies the word, raises ack and goes
// to SendUart. SendUart gives the UART transmitter one start pulse with the
// next byte (bits [7:0] first, bits [127:120] last) and moves to
// WaitUartFinish, which waits for the transmitter's tx_done. In
// 128BitsTransmitted the module returns to SendUart until all sixteen bytes
// are out; then it waits for req to fall and drops ack, returning to Idle.
// So ack falling tells the controller that the whole word has been sent.
// Synchronous active-high reset.
// The states and the four-phase handshake with the controller follow the
// design; the byte order and holding ack until the last byte is sent are
// this design's own choices.
module uart_tx_aux128 (
  input  logic         clk,
  input  logic         rst,
  input  logic         req,
  output logic         ack,
  input  logic [127:0] word,
  output logic         tx_start,
  output logic [7:0]   tx_byte,
  input  logic         tx_done
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT, S_CHECK} state_e;

  state_e           state;
  logic [15:0][7:0] buffer;
  logic [3:0]       idx;
  logic             all_sent;

  assign tx_byte = buffer[idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      buffer   <= '0;
      idx      <= '0;
      ack      <= 1'b0;
      tx_start <= 1'b0;
      all_sent <= 1'b0;
    end else begin
      tx_start <= 1'b0;
      unique case (state)
        S_IDLE: begin
          idx <= '0;
          if (req && !ack) begin
            buffer   <= word;
            ack      <= 1'b1;
            all_sent <= 1'b0;
            state    <= S_SEND;
          end else if (!req) begin
            ack <= 1'b0;
          end
        end
        S_SEND: begin
          tx_start <= 1'b1;
          state    <= S_WAIT;
        end
        S_WAIT: begin
          if (tx_done) begin
            all_sent <= (idx == 4'd15);
            idx      <= idx + 1'b1;
            state    <= S_CHECK;
          end
        end
        default: begin  // S_CHECK: 128BitsTransmitted
          if (!all_sent) begin
            state <= S_SEND;
          end else if (!req) begin
            ack   <= 1'b0;
            state <= S_IDLE;
          end
        end
      endcase
    end
  end
endmodule
