// uart_rx: serial receiver, 8 data bits, no parity, one stop bit.
//
// The line is first synchronised with two flip-flops. In Idle a low level is
// taken as a start bit (FallingEdgeStartBit); after half a bit period the
// line is checked again, and if it is still low the receiver is aligned to
// the middle of the bit, otherwise it returns to Idle. In SampleAllData it
// waits one full bit period before each of the eight data bits (LSB first)
// and samples it. WaitStopBit waits one more bit period for the stop bit,
// ReceivedStopBit waits until the line is high (stop bit present), and
// Cleanup raises rx_done for exactly one clock with rx_byte valid, then
// returns to Idle. CLKS_PER_BIT = clock frequency / baud rate, 136 for a
// 125 MHz clock at 921600 baud. Synchronous active-high reset.
// The states, the half-bit start check and mid-bit sampling follow the
// design; the two-flip-flop synchroniser and the glitch check on the start
// bit are this design's own additions.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 136
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic       rx_done,
  output logic [7:0] rx_byte
);
  typedef enum logic [2:0] {
    S_IDLE, S_START, S_DATA, S_STOP, S_STOP_RECEIVED, S_CLEANUP
  } state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_e        state;
  logic [CW-1:0] clk_cnt;
  logic [2:0]    bit_idx;
  logic [1:0]    sync;
  logic          line;

  assign line = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync    <= 2'b11;
      state   <= S_IDLE;
      clk_cnt <= '0;
      bit_idx <= '0;
      rx_done <= 1'b0;
      rx_byte <= '0;
    end else begin
      sync    <= {sync[0], rx};
      rx_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          clk_cnt <= '0;
          bit_idx <= '0;
          if (!line) state <= S_START;
        end
        S_START: begin
          if (clk_cnt == CW'((CLKS_PER_BIT - 1) / 2)) begin
            clk_cnt <= '0;
            state   <= line ? S_IDLE : S_DATA;
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        S_DATA: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt          <= '0;
            rx_byte[bit_idx] <= line;
            bit_idx          <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= S_STOP;
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        S_STOP: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            state   <= S_STOP_RECEIVED;
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        S_STOP_RECEIVED: begin
          if (line) begin
            rx_done <= 1'b1;
            state   <= S_CLEANUP;
          end
        end
        default: begin  // S_CLEANUP
          clk_cnt <= '0;
          bit_idx <= '0;
          state   <= S_IDLE;
        end
      endcase
    end
  end
endmodule
