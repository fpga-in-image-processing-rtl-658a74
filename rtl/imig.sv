// imig: controller between the platform and the DDR2 memory interface (MIG).
//
// The MIG user interface executes whatever command it is given; this module
// makes sure commands are issued at the right moment. It runs five state
// machines in parallel:
//   Init Ram      - on init_start, if the DDR2 is not yet initialised, puts
//                   the init command (010) on mig_cmd for one clock, clears
//                   it, and waits for mig_init_done.
//   Write Ram     - on wr_req, once initialised, with no command in progress
//                   (mig_cmd_ack low, the other machines idle) and no refresh
//                   pending (mig_auto_ref_req low), holds the write command
//                   and address until mig_cmd_ack, waits two clocks while the
//                   burst is written, raises mig_burst_done for two clocks,
//                   then waits for mig_cmd_ack to fall and answers wr_ack.
//   Fill Write    - on the write acknowledge, drives bits [63:0] of the
//                   latched data on mig_wdata for one clock, then [127:64].
//   Read Ram      - like Write Ram with the read command; it answers rd_ack
//                   once Fill Read has the whole 128 bits.
//   Fill Read     - stores the first valid 64-bit beat in rdata[63:0] and the
//                   second in rdata[127:64], then reports the buffer full.
// wr_req/wr_ack and rd_req/rd_ack are four-phase handshakes: the requester
// holds req (and addr, wdata) until ack rises, then drops req; ack falls
// after req has fallen. rdata is valid while rd_ack is high and stays until
// the next read. Addresses are 32-bit word addresses; one burst moves four
// words (128 bits), 64 bits per clock on the user data bus.
// Everything runs on the rising edge of one clock with synchronous active-
// high reset; the DDR2 clock phases (clk90, clk180) stay inside the MIG.
// The five processes and their states follow the design; the exact command
// codes for write (100) and read (110), the 64-bit user data bus and the
// refresh interlock signal are those of the MIG user interface.
module imig
  import imgproc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // platform side
  input  logic              init_start,
  output logic              init_done,
  input  logic              wr_req,
  output logic              wr_ack,
  input  logic              rd_req,
  output logic              rd_ack,
  input  logic [DDR_AW-1:0] addr,
  input  logic [127:0]      wdata,
  output logic [127:0]      rdata,
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
  typedef enum logic [1:0] {INIT_IDLE, INIT_SET_CMD, INIT_CLEAR_CMD, INIT_DONE} init_e;
  typedef enum logic [2:0] {WR_IDLE, WR_ISSUE, WR_CLK1, WR_CLK2, WR_DONE1, WR_DONE2, WR_END} wr_e;
  typedef enum logic [1:0] {WD_IDLE, WD_LO, WD_HI, WD_END} wd_e;
  typedef enum logic [2:0] {RD_IDLE, RD_ISSUE, RD_CLK1, RD_CLK2, RD_DONE1, RD_DONE2, RD_END} rd_e;
  typedef enum logic [1:0] {RDD_IDLE, RDD_LO, RDD_HI, RDD_FULL} rdd_e;

  init_e  init_state;
  wr_e    wr_state;
  wd_e    wd_state;
  rd_e    rd_state;
  rdd_e   rdd_state;
  logic [127:0] wbuf;

  logic can_issue;
  assign can_issue = (init_state == INIT_DONE) && !mig_cmd_ack && !mig_auto_ref_req
                     && (wr_state == WR_IDLE) && (rd_state == RD_IDLE)
                     && (wd_state == WD_IDLE) && (rdd_state == RDD_IDLE);

  assign init_done = (init_state == INIT_DONE);

  // Command, burst-done and write data follow the states.
  always_comb begin
    mig_cmd = MIG_NOP;
    if (init_state == INIT_SET_CMD) mig_cmd = MIG_INIT;
    else if (wr_state == WR_ISSUE)  mig_cmd = MIG_WRITE;
    else if (rd_state == RD_ISSUE)  mig_cmd = MIG_READ;
    mig_burst_done = (wr_state == WR_DONE1) || (wr_state == WR_DONE2)
                  || (rd_state == RD_DONE1) || (rd_state == RD_DONE2);
    unique case (wd_state)
      WD_LO:   mig_wdata = wbuf[63:0];
      WD_HI:   mig_wdata = wbuf[127:64];
      default: mig_wdata = '0;
    endcase
  end

  // Init Ram
  always_ff @(posedge clk) begin
    if (rst) init_state <= INIT_IDLE;
    else begin
      unique case (init_state)
        INIT_IDLE:      if (mig_init_done) init_state <= INIT_DONE;
                        else if (init_start) init_state <= INIT_SET_CMD;
        INIT_SET_CMD:   init_state <= INIT_CLEAR_CMD;
        INIT_CLEAR_CMD: if (mig_init_done) init_state <= INIT_DONE;
        default:        init_state <= INIT_DONE;
      endcase
    end
  end

  // Write Ram
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_state <= WR_IDLE;
      wr_ack   <= 1'b0;
      wbuf     <= '0;
      mig_addr <= '0;
    end else begin
      unique case (wr_state)
        WR_IDLE:
          if (wr_req && !wr_ack && can_issue) begin
            wbuf     <= wdata;
            mig_addr <= addr;
            wr_state <= WR_ISSUE;
          end else if (rd_req && !rd_ack && can_issue && !wr_req) begin
            mig_addr <= addr;   // read address, used by Read Ram
          end
        WR_ISSUE: if (mig_cmd_ack) wr_state <= WR_CLK1;
        WR_CLK1:  wr_state <= WR_CLK2;
        WR_CLK2:  wr_state <= WR_DONE1;
        WR_DONE1: wr_state <= WR_DONE2;
        WR_DONE2: wr_state <= WR_END;
        default: begin  // WR_END
          if (!mig_cmd_ack && !wr_ack && wd_state == WD_END) wr_ack <= 1'b1;
          if (wr_ack && !wr_req) begin
            wr_ack   <= 1'b0;
            wr_state <= WR_IDLE;
          end
        end
      endcase
    end
  end

  // Fill Write buffer
  always_ff @(posedge clk) begin
    if (rst) wd_state <= WD_IDLE;
    else begin
      unique case (wd_state)
        WD_IDLE: if (wr_state == WR_ISSUE && mig_cmd_ack) wd_state <= WD_LO;
        WD_LO:   wd_state <= WD_HI;
        WD_HI:   wd_state <= WD_END;
        default: if (wr_state == WR_END && wr_ack && !wr_req) wd_state <= WD_IDLE;
      endcase
    end
  end

  // Read Ram
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_state <= RD_IDLE;
      rd_ack   <= 1'b0;
    end else begin
      unique case (rd_state)
        RD_IDLE:  if (rd_req && !rd_ack && can_issue && !wr_req) rd_state <= RD_ISSUE;
        RD_ISSUE: if (mig_cmd_ack) rd_state <= RD_CLK1;
        RD_CLK1:  rd_state <= RD_CLK2;
        RD_CLK2:  rd_state <= RD_DONE1;
        RD_DONE1: rd_state <= RD_DONE2;
        RD_DONE2: rd_state <= RD_END;
        default: begin  // RD_END
          if (!mig_cmd_ack && !rd_ack && rdd_state == RDD_FULL) rd_ack <= 1'b1;
          if (rd_ack && !rd_req) begin
            rd_ack   <= 1'b0;
            rd_state <= RD_IDLE;
          end
        end
      endcase
    end
  end

  // Fill Read buffer
  always_ff @(posedge clk) begin
    if (rst) begin
      rdd_state <= RDD_IDLE;
      rdata     <= '0;
    end else begin
      unique case (rdd_state)
        RDD_IDLE:
          if (rd_state != RD_IDLE && mig_data_valid) begin
            rdata[63:0] <= mig_rdata;
            rdd_state   <= RDD_LO;
          end
        RDD_LO:
          if (mig_data_valid) begin
            rdata[127:64] <= mig_rdata;
            rdd_state     <= RDD_HI;
          end
        RDD_HI:  if (!mig_data_valid) rdd_state <= RDD_FULL;
        default: if (rd_state == RD_END && rd_ack && !rd_req) rdd_state <= RDD_IDLE;
      endcase
    end
  end

  // A request must stay up until it is acknowledged.
  property p_req_held(req, ack);
    @(posedge clk) disable iff (rst) (req && !ack) |=> (req || ack);
  endproperty
  a_wr_req_held: assert property (p_req_held(wr_req, wr_ack));
  a_rd_req_held: assert property (p_req_held(rd_req, rd_ack));
  a_one_op: assert property (@(posedge clk) disable iff (rst)
                             !((wr_state != WR_IDLE) && (rd_state != RD_IDLE)));
endmodule
