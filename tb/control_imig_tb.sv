// control_imig_tb: the main controller with the memory interface
// controller, a behavioural DDR2 model and the algorithm unit, on an 8x3
// image. The testbench plays the UART helpers: it hands image words to the
// controller and acknowledges the words it sends back. Runs, one after the
// other: weighted grayscale, negative, horizontal projection and GLCM. Every
// returned word is compared with values computed here; for the GLCM the
// whole 256x256 matrix and the contrast/energy word are checked, and the
// matrix area starts filled with garbage so that its clearing is tested.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module control_imig_tb;
  import imgproc_pkg::*;
  localparam int W = 8, H = 3, NW = W * H / 4;
  logic clk = 0, rst = 1, start = 0;
  alg_e alg;
  logic [7:0] threshold = 8'd100;
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

  always #5 clk = ~clk;

  control_imig #(.IMG_W(W), .IMG_H(H)) dut (.*);

  imig u_imig (.clk, .rst, .init_start, .init_done, .wr_req, .wr_ack, .rd_req, .rd_ack,
    .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata), .mig_cmd, .mig_addr, .mig_wdata,
    .mig_burst_done, .mig_init_done, .mig_cmd_ack, .mig_data_valid, .mig_rdata, .mig_auto_ref_req);

  mig_ddr2_model #(.REF_PERIOD(300)) u_mem (
    .clk, .rst, .cmd(mig_cmd), .addr(mig_addr), .wdata(mig_wdata), .burst_done(mig_burst_done),
    .init_done(mig_init_done), .cmd_ack(mig_cmd_ack), .data_valid(mig_data_valid),
    .rdata(mig_rdata), .auto_ref_req(mig_auto_ref_req));

  pixel_algorithm_unit u_alg (.clk, .rst, .en(alg_en), .alg, .ref_val(8'd255), .contrast(8'd2),
    .bright(8'd64), .threshold, .word_in(alg_word), .word_out(alg_result));

  // transmit helper stand-in: four-phase acknowledge, collects the words
  always @(posedge clk) begin
    if (tx_req && !tx_ack) begin tx_ack <= 1; sent.push_back(tx_word); end
    else if (!tx_req && tx_ack) tx_ack <= 0;
  end

  function automatic int wg(pixel_t p);
    return (int'(p.red) * 306 + int'(p.green) * 601 + int'(p.blue) * 117 + 512) / 1024;
  endfunction

  task automatic run(alg_e a);
    alg = a; sent.delete();
    start = 1; @(posedge clk); #1 start = 0;
    for (int n = 0; n < NW; n++) begin
      while (!recv_ready) begin @(posedge clk); #1; end
      rx_word = {img[4 * n + 3], img[4 * n + 2], img[4 * n + 1], img[4 * n]};
      rx_word_valid = 1; @(posedge clk); #1 rx_word_valid = 0;
      repeat (20) @(posedge clk);
      #1;
    end
    while (!done) begin @(posedge clk); #1; end
  endtask

  task automatic check_word(int idx, logic [127:0] e, string what);
    checks++;
    if (idx >= sent.size()) begin failures++; $display("FAIL %s word %0d missing", what, idx); end
    else if (sent[idx] !== e) begin
      failures++;
      $display("FAIL %s word %0d got %h expected %h", what, idx, sent[idx], e);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m[int];
    longint ec, ee;
    // image: random pixels with runs of equal gray so that x == y pairs occur
    for (int i = 0; i < W * H; i++) begin
      img[i] = $urandom;
      img[i].pad = 8'h30;
      if (i % 5 == 1) img[i] = img[i - 1];
    end
    // garbage in the matrix area, so that clearing it matters
    for (int i = 0; i < 16384; i++) u_mem.poke(25'(DATA_BASE + 4 * i), {4{32'h0BAD_F00D}});
    alg = ALG_WEIGHTED_GRAY; rx_word = '0;
    repeat (3) @(posedge clk); #1 rst = 0;

    // weighted grayscale: the processed image comes back
    run(ALG_WEIGHTED_GRAY);
    checks++; if (sent.size() != NW) begin failures++; $display("FAIL %0d words sent", sent.size()); end
    for (int n = 0; n < NW; n++) begin
      logic [127:0] e;
      for (int k = 0; k < 4; k++) begin
        automatic int g = wg(img[4 * n + k]);
        e[32 * k +: 32] = {8'h30, 8'(g), 8'(g), 8'(g)};
      end
      check_word(n, e, "gray");
    end

    // negative with reference 255
    run(ALG_NEGATIVE);
    for (int n = 0; n < NW; n++) begin
      logic [127:0] e;
      for (int k = 0; k < 4; k++) e[32 * k +: 32] = {8'h30, ~img[4 * n + k].red, ~img[4 * n + k].green, ~img[4 * n + k].blue};
      check_word(n, e, "negative");
    end

    // horizontal projection: one word per line
    run(ALG_HPROJ);
    checks++; if (sent.size() != H) begin failures++; $display("FAIL %0d line words", sent.size()); end
    for (int l = 0; l < H; l++) begin
      automatic int c = 0;
      for (int x = 0; x < W; x++) if (wg(img[l * W + x]) > threshold) c++;
      check_word(l, 128'(c), "hproj");
    end

    // GLCM
    run(ALG_GLCM);
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
    for (int w = 0; w < 16384 && w < sent.size(); w++) begin
      logic [127:0] e;
      for (int k = 0; k < 4; k++) e[32 * k +: 32] = m.exists(4 * w + k) ? 32'(m[4 * w + k]) : 32'd0;
      checks++;
      if (sent[w] !== e) begin
        failures++;
        if (failures < 10) $display("FAIL matrix word %0d got %h expected %h", w, sent[w], e);
      end
    end
    checks++;
    check_word(16384, {ee[63:0], 16'd0, ec[47:0]}, "features");
    checks++; if (glcm_contrast != ec[47:0] || glcm_energy != ee) failures++;
    checks++; if (u_mem.n_errors != 0) begin failures++; $display("FAIL protocol errors"); end
    $display("contrast %0d energy %0d, %0d refreshes", ec, ee, u_mem.n_refresh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
