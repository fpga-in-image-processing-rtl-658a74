// uart_tx: serial transmitter, 8 data bits, no parity, one stop bit.
//
// In Idle the line is high. A one-clock start pulse loads tx_byte and moves
// to FallingEdgeStartBit, which drives the start bit (low) for one bit
// period; SendAllData sends the eight bits LSB first, one bit period each;
// SendStopBit drives the line high for one bit period; Cleanup raises
// tx_done for one clock and returns to Idle. busy is high from the start
// pulse until Idle is reached again. One byte takes 10*CLKS_PER_BIT + 2
// clocks from start to tx_done. Synchronous active-high reset.
// The states and frame format follow the design; the busy output and the
// exact clock count are this design's own.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 136
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] tx_byte,
  output logic       tx,
  output logic       busy,
  output logic       tx_done
);
  typedef enum logic [2:0] {
    S_IDLE, S_START, S_DATA, S_STOP, S_CLEANUP
  } state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_e        state;
  logic [CW-1:0] clk_cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      clk_cnt <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      tx      <= 1'b1;
      tx_done <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          tx      <= 1'b1;
          clk_cnt <= '0;
          bit_idx <= '0;
          if (start) begin
            shreg <= tx_byte;
            state <= S_START;
          end
        end
        S_START: begin
          tx <= 1'b0;
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            state   <= S_DATA;
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        S_DATA: begin
          tx <= shreg[bit_idx];
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= S_STOP;
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        S_STOP: begin
          tx <= 1'b1;
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            state   <= S_CLEANUP;
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        default: begin  // S_CLEANUP
          tx_done <= 1'b1;
          state   <= S_IDLE;
        end
      endcase
    end
  end
endmodule
