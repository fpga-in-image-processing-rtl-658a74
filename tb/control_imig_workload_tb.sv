// control_imig_workload_tb: the main controller at its default image size
// (640x480) with the memory interface controller, the behavioural DDR2
// model and the algorithm unit. It runs the two kinds of job the platform
// was measured with, at full image size:
//   1. weighted grayscale of a 640x480 image: every returned word is
//      compared with the formula, and the clocks spent processing (from the
//      last image word stored to the first result word) are printed, in
//      total and per 128-bit word;
//   2. GLCM of a 640x480 image: the whole 256x256 matrix and the
//      contrast/energy word are compared with values computed here.
// The testbench stands in for the UART helpers: it hands a new image word
// to the controller as soon as recv_ready allows, and acknowledges result
// words at once, so the serial transfer time (which dominates on the real
// link) is left out. The image is pseudo-random with runs of equal pixels,
// so that equal-gray pairs occur. The refresh period of the model is
// 975 clocks, i.e. 7.8 us at 125 MHz, a usual DDR2 value; the original gives
// no figure for it.
module control_imig_workload_tb;
  import imgproc_pkg::*;
  localparam int W = 640, H = 480, NW = W * H / 4;
  logic clk = 0, rst = 1, start = 0;
  alg_e alg;
  logic [7:0] threshold = 8'd127;
  logic busy, done, recv_ready, rx_word_valid = 0, tx_req, tx_ack = 0;
  word4_t rx_word;
  logic [127:0] tx_word;
  logic init_start, init_done, wr_req, wr_ack, rd_req, rd_ack;
  logic [DDR_AW-1:0] mem_addr;
  logic [127:0] mem_wdata, mem_rdata;
  logic alg_en;
  word4_t alg_word, alg_result;
  logic [47:0] glcm_contrast;
  logic [63:0] glcm_energy;
  mig_cmd_e mig_cmd;
  logic [DDR_AW-1:0] mig_addr;
  logic [63:0] mig_wdata, mig_rdata;
  logic mig_burst_done, mig_init_done, mig_cmd_ack, mig_data_valid, mig_auto_ref_req;

  pixel_t img[W * H];
  logic [127:0] sent[$];
  int checks = 0, failures = 0;
  longint cycle = 0, t_stored = 0, t_first = 0;
  logic tx_seen = 0;

  always #5 clk = ~clk;

  control_imig dut (.*);

  imig u_imig (.clk, .rst, .init_start, .init_done, .wr_req, .wr_ack, .rd_req, .rd_ack,
    .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata), .mig_cmd, .mig_addr, .mig_wdata,
    .mig_burst_done, .mig_init_done, .mig_cmd_ack, .mig_data_valid, .mig_rdata, .mig_auto_ref_req);

  mig_ddr2_model #(.REF_PERIOD(975)) u_mem (
    .clk, .rst, .cmd(mig_cmd), .addr(mig_addr), .wdata(mig_wdata), .burst_done(mig_burst_done),
    .init_done(mig_init_done), .cmd_ack(mig_cmd_ack), .data_valid(mig_data_valid),
    .rdata(mig_rdata), .auto_ref_req(mig_auto_ref_req));

  pixel_algorithm_unit u_alg (.clk, .rst, .en(alg_en), .alg, .ref_val(8'd255), .contrast(8'd2),
    .bright(8'd64), .threshold, .word_in(alg_word), .word_out(alg_result));

  // transmit helper stand-in: four-phase acknowledge, collects the words;
  // also times the first result word of a run
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (tx_req && !tx_ack) begin
      tx_ack <= 1; sent.push_back(tx_word);
      if (!tx_seen) begin tx_seen <= 1; t_first <= cycle; end
    end
    else if (!tx_req && tx_ack) tx_ack <= 0;
  end

  function automatic int wg(pixel_t p);
    return (int'(p.red) * 306 + int'(p.green) * 601 + int'(p.blue) * 117 + 512) / 1024;
  endfunction

  task automatic run(alg_e a);
    alg = a; sent.delete(); tx_seen = 0;
    start = 1; @(posedge clk); #1 start = 0;
    for (int n = 0; n < NW; n++) begin
      while (!recv_ready) begin @(posedge clk); #1; end
      rx_word = {img[4 * n + 3], img[4 * n + 2], img[4 * n + 1], img[4 * n]};
      rx_word_valid = 1; @(posedge clk); #1 rx_word_valid = 0;
    end
    // the last word is stored once the controller is ready for another
    while (!recv_ready && !tx_seen) begin @(posedge clk); #1; end
    t_stored = cycle;
    while (!done) begin @(posedge clk); #1; end
  endtask

  initial begin
    repeat (150000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned m[int];
    longint ec, ee;
    int bad;
    for (int i = 0; i < W * H; i++) begin
      img[i] = $urandom;
      img[i].pad = 8'h00;
      if (i % 7 == 3) img[i] = img[i - 1];
    end
    alg = ALG_WEIGHTED_GRAY; rx_word = '0;
    repeat (3) @(posedge clk); #1 rst = 0;

    // 1. weighted grayscale over the whole image
    run(ALG_WEIGHTED_GRAY);
    $display("weighted gray %0dx%0d: %0d clocks processing, %0d.%02d clocks per word",
             W, H, t_first - t_stored, (t_first - t_stored) / NW, ((t_first - t_stored) % NW) * 100 / NW);
    checks++; if (sent.size() != NW) begin failures++; $display("FAIL %0d words sent", sent.size()); end
    bad = 0;
    for (int n = 0; n < NW && n < sent.size(); n++) begin
      logic [127:0] e;
      for (int k = 0; k < 4; k++) begin
        automatic int g = wg(img[4 * n + k]);
        e[32 * k +: 32] = {8'h00, 8'(g), 8'(g), 8'(g)};
      end
      checks++;
      if (sent[n] !== e) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL gray word %0d got %h expected %h", n, sent[n], e);
      end
    end

    // 2. GLCM over the whole image
    run(ALG_GLCM);
    $display("GLCM %0dx%0d: %0d clocks from image stored to first result word",
             W, H, t_first - t_stored);
    for (int l = 0; l < H; l++)
      for (int x = 0; x + 1 < W; x++) begin
        automatic int a = wg(img[l * W + x]), b = wg(img[l * W + x + 1]);
        m[a * 256 + b] = m.exists(a * 256 + b) ? m[a * 256 + b] + 1 : 1;
        m[b * 256 + a] = m.exists(b * 256 + a) ? m[b * 256 + a] + 1 : 1;
      end
    ec = 0; ee = 0;
    foreach (m[key]) begin
      ec += longint'((key / 256 - key % 256) * (key / 256 - key % 256)) * m[key];
      ee += longint'(m[key]) * m[key];
    end
    checks++; if (sent.size() != 16385) begin failures++; $display("FAIL %0d glcm words", sent.size()); end
    bad = 0;
    for (int w = 0; w < 16384 && w < sent.size(); w++) begin
      logic [127:0] e;
      for (int k = 0; k < 4; k++) e[32 * k +: 32] = m.exists(4 * w + k) ? 32'(m[4 * w + k]) : 32'd0;
      checks++;
      if (sent[w] !== e) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL matrix word %0d got %h expected %h", w, sent[w], e);
      end
    end
    checks++;
    if (sent.size() < 16385 || sent[16384] !== {ee[63:0], 16'd0, ec[47:0]}) begin
      failures++; $display("FAIL feature word");
    end
    checks++; if (glcm_contrast != ec[47:0] || glcm_energy != ee) failures++;
    checks++; if (u_mem.n_errors != 0) begin failures++; $display("FAIL protocol errors"); end
    $display("contrast %0d energy %0d, %0d refreshes", ec, ee, u_mem.n_refresh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
