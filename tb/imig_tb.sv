// imig_tb: the memory interface controller against a behavioural model of
// the DDR2 controller and memory. Initialises the memory, then performs a
// random mix of 128-bit writes and reads with four-phase handshakes and
// compares every read with a reference copy of the memory. Refresh requests
// come often, so commands must wait for them; the model counts protocol
// errors (a command during refresh or before init, stray burst_done).
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module imig_tb;
  import imgproc_pkg::*;
  logic clk = 0, rst = 1;
  logic init_start = 0, init_done, wr_req = 0, wr_ack, rd_req = 0, rd_ack;
  logic [DDR_AW-1:0] addr;
  logic [127:0] wdata, rdata;
  mig_cmd_e mig_cmd;
  logic [DDR_AW-1:0] mig_addr;
  logic [63:0] mig_wdata, mig_rdata;
  logic mig_burst_done, mig_init_done, mig_cmd_ack, mig_data_valid, mig_auto_ref_req;
  logic [127:0] ref_mem [logic [22:0]];
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0, refresh_waits = 0;

  always #5 clk = ~clk;

  imig dut (.*);

  mig_ddr2_model #(.REF_PERIOD(40), .UNWRITTEN('0)) u_mem (
    .clk, .rst, .cmd(mig_cmd), .addr(mig_addr), .wdata(mig_wdata), .burst_done(mig_burst_done),
    .init_done(mig_init_done), .cmd_ack(mig_cmd_ack), .data_valid(mig_data_valid),
    .rdata(mig_rdata), .auto_ref_req(mig_auto_ref_req));

  always @(posedge clk) if ((wr_req || rd_req) && mig_auto_ref_req) refresh_waits++;

  task automatic do_write(logic [DDR_AW-1:0] a, logic [127:0] d);
    addr = a; wdata = d; wr_req = 1;
    while (!wr_ack) begin @(posedge clk); #1; end
    wr_req = 0; addr = 'x; wdata = ~d;
    while (wr_ack) begin @(posedge clk); #1; end
    ref_mem[a[24:2]] = d;
    n_wr++;
  endtask

  task automatic do_read(logic [DDR_AW-1:0] a);
    logic [127:0] e;
    addr = a; rd_req = 1;
    while (!rd_ack) begin @(posedge clk); #1; end
    e = ref_mem.exists(a[24:2]) ? ref_mem[a[24:2]] : '0;
    checks++;
    if (rdata != e) begin failures++; $display("FAIL read %h got %h expected %h", a, rdata, e); end
    rd_req = 0;
    while (rd_ack) begin @(posedge clk); #1; end
    n_rd++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0; wdata = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    // a request before init must wait
    repeat (5) @(posedge clk); #1;
    checks++; if (init_done) failures++;
    init_start = 1; @(posedge clk); #1 init_start = 0;
    while (!init_done) begin @(posedge clk); #1; end
    checks++; if (mig_init_done !== 1'b1) failures++;
    for (int n = 0; n < 600; n++) begin
      automatic logic [DDR_AW-1:0] a = {($urandom_range(1) ? 1'b1 : 1'b0), 14'd0, 8'($urandom_range(40)), 2'b00};
      if ($urandom_range(1)) do_write(a, {$urandom, $urandom, $urandom, $urandom});
      else do_read(a);
      repeat ($urandom_range(2)) @(posedge clk);
      #1;
    end
    checks++; if (u_mem.n_errors != 0) begin failures++; $display("FAIL %0d protocol errors", u_mem.n_errors); end
    checks++; if (u_mem.n_writes != n_wr || u_mem.n_reads != n_rd) begin failures++; $display("FAIL op counts"); end
    checks++; if (refresh_waits == 0) begin failures++; $display("FAIL no request met a refresh"); end
    $display("imig_tb: %0d writes, %0d reads, %0d refreshes, %0d clocks waited for refresh", n_wr, n_rd, u_mem.n_refresh, refresh_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
