// control_imig: main controller of the image processing platform.
//
// One run, started by a start pulse, goes through the operations below in
// order; every exchange with another module is a four-phase req/ack
// handshake (raise req, wait for ack, drop req, wait for ack to fall).
//   1. Initialise the DDR2 through imig (init_start, wait init_done).
//   2. GLCM only: write zeros to the 256x256 matrix in the data area
//      (16384 words of 128 bits from DATA_BASE).
//   3. Receive the image: each 128-bit word assembled from the UART (a
//      rx_word_valid strobe) is written to the image area, word n at word
//      address 4n, until IMG_W*IMG_H/4 words are stored.
//   4. Process: each image word is read back and
//        - pixel algorithms: given to the algorithm unit (alg_en pulse) and
//          the result written back in place;
//        - horizontal projection: given to the projection unit (hp_load);
//          each line count it reports is written to DATA_BASE + 4*line;
//        - GLCM: converted to four gray values; the horizontal neighbour
//          pairs (x,y) of the word (three at the start of a line, otherwise
//          four, the first using the last pixel of the previous word) each
//          update the matrix by read-modify-write: M[x][y] += 1 and
//          M[y][x] += 1, or M[x][x] += 2 when x == y. Entry (x,y) is the
//          32-bit word at DATA_BASE + 256x + y.
//   5. GLCM only: read the whole matrix and stream its entries into the
//      contrast/energy accumulators.
//   6. Send the results to the host through the UART transmitter helper:
//      the processed image, the IMG_H line counts, or the matrix followed
//      by one word {energy[63:0], 16'b0, contrast[47:0]}.
// done is high from the end of a run until the next start; recv_ready is
// high while the controller waits for image words and its one-word buffer
// is empty (the host should send only while it is high).
// The sequence of operations, the address map and the GLCM pair rules
// follow the design; the word formats of the results and the order in
// which they are sent are this design's choice. Synchronous active-high
// reset. IMG_W must be a multiple of 4.
module control_imig
  import imgproc_pkg::*;
#(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  alg_e              alg,
  input  logic [7:0]        threshold,
  output logic              busy,
  output logic              done,
  output logic              recv_ready,
  // UART receive side
  input  logic              rx_word_valid,
  input  word4_t            rx_word,
  // UART transmit side
  output logic              tx_req,
  input  logic              tx_ack,
  output logic [127:0]      tx_word,
  // memory controller
  output logic              init_start,
  input  logic              init_done,
  output logic              wr_req,
  input  logic              wr_ack,
  output logic              rd_req,
  input  logic              rd_ack,
  output logic [DDR_AW-1:0] mem_addr,
  output logic [127:0]      mem_wdata,
  input  logic [127:0]      mem_rdata,
  // pixel algorithm unit
  output logic              alg_en,
  output word4_t            alg_word,
  input  word4_t            alg_result,
  // features
  output logic [47:0]       glcm_contrast,
  output logic [63:0]       glcm_energy
);
  localparam int unsigned NWORDS         = IMG_W * IMG_H / 4;
  localparam int unsigned WORDS_PER_LINE = IMG_W / 4;
  localparam int unsigned MATRIX_WORDS   = 256 * 256 / 4;
  localparam int unsigned WW             = $clog2(NWORDS + 1);
  localparam int unsigned LW             = $clog2(IMG_H + 1);
  localparam int unsigned PW             = $clog2(WORDS_PER_LINE + 1);

  typedef enum logic [4:0] {
    S_IDLE, S_INIT, S_CLEAR, S_RECV, S_PROC_READ, S_PROC_APPLY, S_PROC_WAIT,
    S_PROC_WRITE, S_HP_LOAD, S_HP_CHECK, S_GL_PAIR, S_GL_READ, S_GL_INC,
    S_GL_NEXT, S_NEXT_WORD, S_FEAT_READ, S_FEAT_ACC, S_SEND_READ, S_SEND_TX,
    S_SEND_REL, S_DONE, S_MEM
  } state_e;

  state_e          state, ret_state;
  logic            mem_phase;          // 0: req up, 1: waiting for ack to fall
  logic            op_write;
  logic [WW-1:0]   word_idx;
  logic [PW-1:0]   pos_in_line;
  logic [LW-1:0]   line_idx;
  logic [13:0]     mat_idx;
  logic [1:0]      lane;
  logic [1:0]      pair_idx;
  logic            second;
  logic [7:0]      cx, cy, prev_gray;
  logic [3:0][7:0] gray_now, gray_r;
  word4_t          cur_word;
  logic            rx_pending;
  word4_t          rx_hold;
  logic            send_feat;
  logic            hp_load, hp_available;
  logic [7:0]      hp_hi, hp_lo;
  logic            feat_valid, feat_clear;
  logic [7:0]      feat_i, feat_j;
  logic [31:0]     feat_value;
  logic [127:0]    rd_word;
  logic [31:0]     send_count;
  logic [31:0]     send_idx;

  four_weighted_gray u_gray (.pixels(cur_word), .gray(gray_now));

  horizontal_projection #(.IMG_WIDTH(IMG_W)) u_hproj (
    .clk, .rst, .load(hp_load), .threshold, .pixels(cur_word),
    .count_hi(hp_hi), .count_lo(hp_lo), .available(hp_available));

  glcm_features u_feat (
    .clk, .rst, .clear(feat_clear), .valid(feat_valid), .i(feat_i), .j(feat_j),
    .value(feat_value), .contrast(glcm_contrast), .energy(glcm_energy));

  assign wr_req   = (state == S_MEM) && !mem_phase && op_write;
  assign rd_req   = (state == S_MEM) && !mem_phase && !op_write;
  assign alg_word = cur_word;
  assign busy       = (state != S_IDLE) && (state != S_DONE);
  assign recv_ready = (state == S_RECV) && !rx_pending;

  function automatic logic [DDR_AW-1:0] matrix_addr(input logic [7:0] x, y);
    return DDR_AW'(DATA_BASE) + {9'd0, x, y[7:2], 2'b00};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      ret_state   <= S_IDLE;
      mem_phase   <= 1'b0;
      op_write    <= 1'b0;
      mem_addr    <= '0;
      mem_wdata   <= '0;
      rd_word     <= '0;
      word_idx    <= '0;
      pos_in_line <= '0;
      line_idx    <= '0;
      mat_idx     <= '0;
      lane        <= '0;
      pair_idx    <= '0;
      second      <= 1'b0;
      cx          <= '0;
      cy          <= '0;
      prev_gray   <= '0;
      gray_r      <= '0;
      cur_word    <= '0;
      rx_pending  <= 1'b0;
      rx_hold     <= '0;
      send_feat   <= 1'b0;
      send_count  <= '0;
      send_idx    <= '0;
      tx_req      <= 1'b0;
      tx_word     <= '0;
      init_start  <= 1'b0;
      alg_en      <= 1'b0;
      hp_load     <= 1'b0;
      feat_valid  <= 1'b0;
      feat_clear  <= 1'b0;
      feat_i      <= '0;
      feat_j      <= '0;
      feat_value  <= '0;
      done        <= 1'b0;
    end else begin
      alg_en     <= 1'b0;
      hp_load    <= 1'b0;
      feat_valid <= 1'b0;
      feat_clear <= 1'b0;
      init_start <= 1'b0;

      // Words from the UART are held until they are written.
      if (rx_word_valid) begin
        rx_hold    <= rx_word;
        rx_pending <= 1'b1;
      end

      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            done        <= 1'b0;
            word_idx    <= '0;
            pos_in_line <= '0;
            line_idx    <= '0;
            mat_idx     <= '0;
            send_idx    <= '0;
            feat_clear  <= 1'b1;
            rx_pending  <= 1'b0;
            state       <= S_INIT;
          end
        end

        S_INIT: begin
          init_start <= !init_done;
          if (init_done) state <= (alg == ALG_GLCM) ? S_CLEAR : S_RECV;
        end

        S_CLEAR: begin
          if (mat_idx == 14'(MATRIX_WORDS - 1)) ret_state <= S_RECV;
          else                                  ret_state <= S_CLEAR;
          mat_idx   <= mat_idx + 1'b1;
          op_write  <= 1'b1;
          mem_addr  <= DDR_AW'(DATA_BASE) + DDR_AW'({mat_idx, 2'b00});
          mem_wdata <= '0;
          state     <= S_MEM;
        end

        S_RECV: begin
          if (word_idx == WW'(NWORDS)) begin
            word_idx <= '0;
            state    <= S_PROC_READ;
          end else if (rx_pending && !rx_word_valid) begin
            rx_pending <= 1'b0;
            op_write   <= 1'b1;
            mem_addr   <= DDR_AW'({word_idx, 2'b00});
            mem_wdata  <= rx_hold;
            word_idx   <= word_idx + 1'b1;
            ret_state  <= S_RECV;
            state      <= S_MEM;
          end
        end

        S_PROC_READ: begin
          op_write  <= 1'b0;
          mem_addr  <= DDR_AW'({word_idx, 2'b00});
          ret_state <= S_PROC_APPLY;
          state     <= S_MEM;
        end

        S_PROC_APPLY: begin
          cur_word <= rd_word;
          unique case (alg)
            ALG_GLCM: state <= S_GL_PAIR;
            ALG_HPROJ: state <= S_HP_LOAD;
            default: begin
              alg_en <= 1'b1;
              state  <= S_PROC_WAIT;
            end
          endcase
          pair_idx <= (pos_in_line == '0) ? 2'd1 : 2'd0;
          second   <= 1'b0;
        end

        S_PROC_WAIT: state <= S_PROC_WRITE;   // algorithm unit registers

        S_PROC_WRITE: begin
          op_write  <= 1'b1;
          mem_wdata <= alg_result;
          ret_state <= S_NEXT_WORD;
          state     <= S_MEM;
        end

        S_HP_LOAD: begin
          hp_load <= 1'b1;
          state   <= S_HP_CHECK;
        end

        S_HP_CHECK: begin
          if (hp_available) begin
            op_write  <= 1'b1;
            mem_addr  <= DDR_AW'(DATA_BASE) + DDR_AW'({line_idx, 2'b00});
            mem_wdata <= {112'd0, hp_hi, hp_lo};
            line_idx  <= line_idx + 1'b1;
            ret_state <= S_NEXT_WORD;
            state     <= S_MEM;
          end else if (!hp_load) begin
            state <= S_NEXT_WORD;
          end
        end

        S_GL_PAIR: begin
          gray_r <= gray_now;
          if (pair_idx == 2'd0) begin
            cx <= prev_gray;
            cy <= gray_now[0];
          end else begin
            cx <= gray_now[pair_idx - 1'b1];
            cy <= gray_now[pair_idx];
          end
          second <= 1'b0;
          state  <= S_GL_READ;
        end

        S_GL_READ: begin
          op_write  <= 1'b0;
          mem_addr  <= matrix_addr(cx, cy);
          ret_state <= S_GL_INC;
          state     <= S_MEM;
        end

        S_GL_INC: begin
          mem_wdata <= rd_word;
          mem_wdata[32*cy[1:0] +: 32] <= rd_word[32*cy[1:0] +: 32] + ((cx == cy) ? 32'd2 : 32'd1);
          op_write  <= 1'b1;
          ret_state <= S_GL_NEXT;
          state     <= S_MEM;
        end

        S_GL_NEXT: begin
          if (!second && cx != cy) begin
            second <= 1'b1;
            cx     <= cy;
            cy     <= cx;
            state  <= S_GL_READ;
          end else if (pair_idx == 2'd3) begin
            prev_gray <= gray_r[3];
            state     <= S_NEXT_WORD;
          end else begin
            pair_idx <= pair_idx + 1'b1;
            state    <= S_GL_PAIR;
          end
        end

        S_NEXT_WORD: begin
          pos_in_line <= (pos_in_line == PW'(WORDS_PER_LINE - 1)) ? '0 : pos_in_line + 1'b1;
          if (word_idx == WW'(NWORDS - 1)) begin
            word_idx <= '0;
            mat_idx  <= '0;
            lane     <= '0;
            send_idx <= '0;
            send_feat <= 1'b0;
            unique case (alg)
              ALG_GLCM:  begin send_count <= 32'(MATRIX_WORDS); state <= S_FEAT_READ; end
              ALG_HPROJ: begin send_count <= 32'(IMG_H);        state <= S_SEND_READ; end
              default:   begin send_count <= 32'(NWORDS);       state <= S_SEND_READ; end
            endcase
          end else begin
            word_idx <= word_idx + 1'b1;
            state    <= S_PROC_READ;
          end
        end

        S_FEAT_READ: begin
          op_write  <= 1'b0;
          mem_addr  <= DDR_AW'(DATA_BASE) + DDR_AW'({mat_idx, 2'b00});
          lane      <= '0;
          ret_state <= S_FEAT_ACC;
          state     <= S_MEM;
        end

        S_FEAT_ACC: begin
          feat_valid <= 1'b1;
          {feat_i, feat_j} <= {mat_idx, lane};
          feat_value <= rd_word[32*lane +: 32];
          lane       <= lane + 1'b1;
          if (lane == 2'd3) begin
            mat_idx <= mat_idx + 1'b1;
            state   <= (mat_idx == 14'(MATRIX_WORDS - 1)) ? S_SEND_READ : S_FEAT_READ;
          end
        end

        S_SEND_READ: begin
          if (send_idx == send_count) begin
            if (alg == ALG_GLCM && !send_feat) begin
              send_feat <= 1'b1;
              tx_word   <= {glcm_energy, 16'd0, glcm_contrast};
              state     <= S_SEND_TX;
            end else begin
              done  <= 1'b1;
              state <= S_DONE;
            end
          end else begin
            op_write  <= 1'b0;
            mem_addr  <= (alg == ALG_GLCM || alg == ALG_HPROJ)
                         ? DDR_AW'(DATA_BASE) + DDR_AW'({send_idx, 2'b00})
                         : DDR_AW'({send_idx, 2'b00});
            send_idx  <= send_idx + 1'b1;
            ret_state <= S_SEND_TX;
            state     <= S_MEM;
          end
        end

        S_SEND_TX: begin
          if (!send_feat || send_idx != send_count) tx_word <= rd_word;
          tx_req <= 1'b1;
          if (tx_req && tx_ack) begin
            tx_req <= 1'b0;
            state  <= S_SEND_REL;
          end
        end

        S_SEND_REL: if (!tx_ack) state <= S_SEND_READ;

        default: begin  // S_MEM: one four-phase exchange with imig
          if (!mem_phase) begin
            if (op_write ? wr_ack : rd_ack) begin
              if (!op_write) rd_word <= mem_rdata;
              mem_phase <= 1'b1;
            end
          end else if (!(op_write ? wr_ack : rd_ack)) begin
            mem_phase <= 1'b0;
            state     <= ret_state;
          end
        end
      endcase
    end
  end

  a_tx_req_held: assert property (@(posedge clk) disable iff (rst)
                                  (tx_req && !tx_ack) |=> (tx_req || tx_ack));
endmodule
