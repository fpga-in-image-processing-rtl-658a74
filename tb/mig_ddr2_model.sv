// mig_ddr2_model: behavioural model of the vendor DDR2 controller (MIG user
// interface) together with the DDR2 memory behind it. Simulation only, not
// synthesizable.
//
// Memory is a sparse array of 128-bit bursts indexed by word address / 4
// (unwritten bursts read as UNWRITTEN). Timing, in clocks of clk:
//  - init command (010): init_done rises INIT_LAT clocks later.
//  - write (100) / read (110): accepted when idle and no refresh is
//    pending; cmd_ack rises ACK_LAT clocks later. Write data is taken on the
//    first and second clock after cmd_ack first rose (low then high 64 bits).
//    Read data comes RD_LAT clocks after burst_done, two beats with
//    data_valid. cmd_ack falls TAIL clocks after the burst ends.
//  - auto_ref_req rises every REF_PERIOD idle clocks for REF_LEN clocks; a
//    command that meets a refresh request is held until it ends.
// It counts writes, reads and refreshes and flags protocol errors (a new
// command after a refresh request was visible, a read or write before
// init, a burst_done while idle).
// The handshake order follows the MIG user interface as the design
// describes it (command, acknowledge, data, burst done); the latencies, the
// refresh period and the error checks are this model's own choices.
module mig_ddr2_model #(
  parameter int INIT_LAT   = 20,
  parameter int ACK_LAT    = 2,
  parameter int RD_LAT     = 3,
  parameter int TAIL       = 2,
  parameter int REF_PERIOD = 700,
  parameter int REF_LEN    = 6,
  parameter logic [127:0] UNWRITTEN = {4{32'hDEAD_BEEF}}
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  cmd,
  input  logic [24:0] addr,
  input  logic [63:0] wdata,
  input  logic        burst_done,
  output logic        init_done,
  output logic        cmd_ack,
  output logic        data_valid,
  output logic [63:0] rdata,
  output logic        auto_ref_req
);
  logic [127:0] mem [logic [22:0]];

  typedef enum {M_IDLE, M_ACKWAIT, M_ACTIVE, M_RDLAT, M_RD0, M_RD1, M_TAIL} mstate_e;
  mstate_e st;
  int      cnt, ack_cnt, ref_cnt, init_cnt;
  bit      is_write, init_pending, bd_seen, ref_q;
  logic [22:0]  burst;
  logic [127:0] wbuf, rbuf;
  int n_writes, n_reads, n_refresh, n_errors;

  function automatic logic [127:0] peek(input logic [24:0] a);
    if (mem.exists(a[24:2])) return mem[a[24:2]];
    return UNWRITTEN;
  endfunction

  task automatic poke(input logic [24:0] a, input logic [127:0] d);
    mem[a[24:2]] = d;
  endtask

  always @(posedge clk) begin
    if (rst) begin
      st <= M_IDLE; cmd_ack <= 0; data_valid <= 0; rdata <= '0; auto_ref_req <= 0;
      init_done <= 0; init_pending <= 0; ref_cnt <= 0; cnt <= 0; ack_cnt <= 0;
      n_writes <= 0; n_reads <= 0; n_refresh <= 0; n_errors <= 0; bd_seen <= 0;
    end else begin
      // initialisation
      if (cmd == 3'b010 && !init_done) begin init_pending <= 1; init_cnt <= INIT_LAT; end
      if (init_pending) begin
        if (init_cnt == 0) begin init_done <= 1; init_pending <= 0; end
        else init_cnt <= init_cnt - 1;
      end
      // refresh requests
      if (init_done) begin
        if ((st == M_IDLE && cmd == 3'b000) || auto_ref_req) ref_cnt <= ref_cnt + 1;
        if (ref_cnt == REF_PERIOD) begin auto_ref_req <= 1; n_refresh <= n_refresh + 1; end
        if (ref_cnt == REF_PERIOD + REF_LEN) begin auto_ref_req <= 0; ref_cnt <= 0; end
      end
      if (cmd_ack) ack_cnt <= ack_cnt + 1;
      // a new command while a refresh request was already visible
      ref_q <= auto_ref_req && cmd == 3'b000;
      if (ref_q && cmd != 3'b000 && cmd != 3'b010) n_errors <= n_errors + 1;
      if (burst_done) bd_seen <= 1;
      case (st)
        M_IDLE: begin
          ack_cnt <= 0; bd_seen <= 0;
          if ((cmd == 3'b100 || cmd == 3'b110) && !auto_ref_req) begin
            if (!init_done) n_errors <= n_errors + 1;
            is_write <= (cmd == 3'b100);
            burst    <= addr[24:2];
            cnt      <= ACK_LAT;
            st       <= M_ACKWAIT;
          end
          if (burst_done) n_errors <= n_errors + 1;
        end
        M_ACKWAIT: begin
          if (cnt <= 1) begin cmd_ack <= 1; st <= M_ACTIVE; end
          else cnt <= cnt - 1;
        end
        M_ACTIVE: begin
          if (is_write) begin
            if (ack_cnt == 1) wbuf[63:0]   <= wdata;
            if (ack_cnt == 2) wbuf[127:64] <= wdata;
          end
          if (bd_seen && !burst_done) begin
            if (is_write) begin
              mem[burst] = wbuf;
              n_writes <= n_writes + 1;
              cnt <= TAIL; st <= M_TAIL;
            end else begin
              n_reads <= n_reads + 1;
              cnt <= RD_LAT; st <= M_RDLAT;
            end
          end
        end
        M_RDLAT: begin
          if (cnt <= 1) begin
            rbuf = peek({burst, 2'b00});
            data_valid <= 1; rdata <= rbuf[63:0]; st <= M_RD0;
          end else cnt <= cnt - 1;
        end
        M_RD0: begin rdata <= rbuf[127:64]; st <= M_RD1; end
        M_RD1: begin data_valid <= 0; cnt <= TAIL; st <= M_TAIL; end
        default: begin  // M_TAIL
          if (cnt <= 1) begin
            cmd_ack <= 0;
            if (cmd == 3'b000) st <= M_IDLE;
          end else cnt <= cnt - 1;
        end
      endcase
    end
  end
endmodule
