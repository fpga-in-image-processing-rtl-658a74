// validation_platform_top: FPGA side of the image processing validation
// platform.
//
// A host sends an image over a serial line (921600 baud, 8N1) as 32-bit
// pixels (blue, green, red, padding byte). The platform packs the bytes
// into 128-bit words, stores them in DDR2 through the memory interface
// controller, runs the selected algorithm on the stored image (one of the
// per-pixel library algorithms, the horizontal projection, or the GLCM with
// contrast and energy), and sends the processed image or the extracted
// features back over the serial line.
//   uart_rx -> uart_rx_aux128 -> control_imig <-> imig <-> MIG (DDR2)
//   control_imig <-> pixel_algorithm_unit
//   control_imig -> uart_tx_aux128 -> uart_tx
// The DDR2 controller generated by the FPGA vendor tools (MIG) is not part
// of this RTL: its user interface is brought out as the mig_* ports.
// init_btn and start are the board push buttons (initialise DDR2, start a
// run); rst is the third. All logic runs on clk (125 MHz in the original
// board, shared with the DDR2 controller). CLKS_PER_BIT = clock / baud rate.
// The module set and connections follow the design. Leaving the MIG
// outside, the single algorithm selector and the processing settings as
// inputs are this design's own choices.
module validation_platform_top
  import imgproc_pkg::*;
#(
  parameter int unsigned IMG_W        = 640,
  parameter int unsigned IMG_H        = 480,
  parameter int unsigned CLKS_PER_BIT = 136
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              init_btn,
  input  logic              start,
  input  alg_e              alg,
  input  logic [7:0]        ref_val,
  input  logic [7:0]        contrast,
  input  logic [7:0]        bright,
  input  logic [7:0]        threshold,
  input  logic              uart_rx_line,
  output logic              uart_tx_line,
  output logic              busy,
  output logic              done,
  output logic              recv_ready,
  output logic [47:0]       glcm_contrast,
  output logic [63:0]       glcm_energy,
  // MIG user interface
  output mig_cmd_e          mig_cmd,
  output logic [DDR_AW-1:0] mig_addr,
  output logic [63:0]       mig_wdata,
  output logic              mig_burst_done,
  input  logic              mig_init_done,
  input  logic              mig_cmd_ack,
  input  logic              mig_data_valid,
  input  logic [63:0]       mig_rdata,
  input  logic              mig_auto_ref_req
);
  logic         rx_done, rx_word_valid;
  logic [7:0]   rx_byte;
  logic [127:0] rx_word;
  logic         tx_req, tx_ack, tx_start, tx_busy, tx_done;
  logic [127:0] tx_word;
  logic [7:0]   tx_byte;
  logic         ctrl_init, init_done, wr_req, wr_ack, rd_req, rd_ack;
  logic [DDR_AW-1:0] mem_addr;
  logic [127:0] mem_wdata, mem_rdata;
  logic         alg_en;
  word4_t       alg_word, alg_result;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk, .rst, .rx(uart_rx_line), .rx_done, .rx_byte);

  uart_rx_aux128 u_rx_aux (
    .clk, .rst, .rx_done, .rx_byte, .word_valid(rx_word_valid), .word(rx_word));

  control_imig #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_ctrl (
    .clk, .rst, .start, .alg, .threshold, .busy, .done, .recv_ready,
    .rx_word_valid, .rx_word(word4_t'(rx_word)),
    .tx_req, .tx_ack, .tx_word,
    .init_start(ctrl_init), .init_done, .wr_req, .wr_ack, .rd_req, .rd_ack,
    .mem_addr, .mem_wdata, .mem_rdata,
    .alg_en, .alg_word, .alg_result,
    .glcm_contrast, .glcm_energy);

  imig u_imig (
    .clk, .rst, .init_start(init_btn | ctrl_init), .init_done,
    .wr_req, .wr_ack, .rd_req, .rd_ack, .addr(mem_addr), .wdata(mem_wdata),
    .rdata(mem_rdata),
    .mig_cmd, .mig_addr, .mig_wdata, .mig_burst_done, .mig_init_done,
    .mig_cmd_ack, .mig_data_valid, .mig_rdata, .mig_auto_ref_req);

  pixel_algorithm_unit u_alg (
    .clk, .rst, .en(alg_en), .alg, .ref_val, .contrast, .bright, .threshold,
    .word_in(alg_word), .word_out(alg_result));

  uart_tx_aux128 u_tx_aux (
    .clk, .rst, .req(tx_req), .ack(tx_ack), .word(tx_word),
    .tx_start, .tx_byte, .tx_done);

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk, .rst, .start(tx_start), .tx_byte, .tx(uart_tx_line), .busy(tx_busy),
    .tx_done);
endmodule
