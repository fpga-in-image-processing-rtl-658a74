// validation_platform_top_tb: end-to-end test of the platform through its
// serial line, with a behavioural DDR2 controller/memory on the MIG ports.
// A host model sends an 8x2 image as bytes (blue, green, red, '0' per
// pixel) at CLKS_PER_BIT = 8 and decodes what comes back. Every algorithm
// is run once; the returned image, line counts, GLCM matrix and feature
// word are compared with values computed here. It also counts the
// mechanisms of the design and fails if one never happened: DDR2 refresh
// holding a request, GLCM pairs with x == y and x != y, words starting a
// line (three pairs) and continuing one (four pairs), a projection line
// result, bright/contrast clamping, and the four-phase word handshakes on
// both UART sides.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module validation_platform_top_tb;
  import imgproc_pkg::*;
  localparam int W = 8, H = 2, NW = W * H / 4, CPB = 8;
  logic clk = 0, rst = 1, init_btn = 0, start = 0;
  alg_e alg;
  logic [7:0] ref_val = 8'd255, contrast = 8'd2, bright = 8'd64, threshold = 8'd127;
  logic rx_line = 1, tx_line, busy, done, recv_ready;
  logic [47:0] glcm_contrast;
  logic [63:0] glcm_energy;
  mig_cmd_e mig_cmd;
  logic [DDR_AW-1:0] mig_addr;
  logic [63:0] mig_wdata, mig_rdata;
  logic mig_burst_done, mig_init_done, mig_cmd_ack, mig_data_valid, mig_auto_ref_req;

  pixel_t img[W * H];
  logic [7:0] rxq[$];
  int checks = 0, failures = 0;
  int n_ref_hold = 0, n_eq = 0, n_neq = 0, n_line_start = 0, n_line_cont = 0;
  int n_hp_lines = 0, n_clamp = 0, n_rx_words = 0, n_tx_words = 0;

  always #5 clk = ~clk;

  validation_platform_top #(.IMG_W(W), .IMG_H(H), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst, .init_btn, .start, .alg, .ref_val, .contrast, .bright, .threshold,
    .uart_rx_line(rx_line), .uart_tx_line(tx_line), .busy, .done, .recv_ready,
    .glcm_contrast, .glcm_energy, .mig_cmd, .mig_addr, .mig_wdata, .mig_burst_done,
    .mig_init_done, .mig_cmd_ack, .mig_data_valid, .mig_rdata, .mig_auto_ref_req);

  mig_ddr2_model #(.REF_PERIOD(150)) u_mem (
    .clk, .rst, .cmd(mig_cmd), .addr(mig_addr), .wdata(mig_wdata), .burst_done(mig_burst_done),
    .init_done(mig_init_done), .cmd_ack(mig_cmd_ack), .data_valid(mig_data_valid),
    .rdata(mig_rdata), .auto_ref_req(mig_auto_ref_req));

  // mechanism counters, from the top's ports and internal strobes
  always @(posedge clk) if (!rst) begin
    if (mig_auto_ref_req && (dut.wr_req || dut.rd_req)) n_ref_hold++;
    if (dut.u_ctrl.hp_available) n_hp_lines++;
    if (dut.rx_word_valid) n_rx_words++;
    if (dut.tx_req && !dut.tx_ack) n_tx_words++;
  end

  // host receiver: samples the middle of each bit
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge tx_line);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx_line; end
      repeat (CPB) @(posedge clk);
      rxq.push_back(b);
    end
  end

  task automatic host_send(logic [7:0] b);
    rx_line = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx_line = b[i]; repeat (CPB) @(posedge clk); end
    rx_line = 1; repeat (CPB) @(posedge clk);
  endtask

  function automatic int wg(pixel_t p);
    return (int'(p.red) * 306 + int'(p.green) * 601 + int'(p.blue) * 117 + 512) / 1024;
  endfunction
  function automatic logic [7:0] bc(int c);
    int v = c * 2 + 64;
    return (v > 255) ? 8'd255 : 8'(v);
  endfunction
  function automatic pixel_t gp(int g);
    return '{pad: 8'h30, red: 8'(g), green: 8'(g), blue: 8'(g)};
  endfunction
  function automatic pixel_t model(alg_e a, pixel_t p);
    case (a)
      ALG_RED_CHANNEL:     return gp(p.red);
      ALG_GREEN_CHANNEL:   return gp(p.green);
      ALG_NEGATIVE:        return '{pad: p.pad, red: ~p.red, green: ~p.green, blue: ~p.blue};
      ALG_BRIGHT_CONTRAST: return '{pad: p.pad, red: bc(p.red), green: bc(p.green), blue: bc(p.blue)};
      ALG_SIMPLE_GRAY:     return gp(((int'(p.red) + p.green + p.blue) * 683 + 1024) / 2048);
      ALG_BINARIZATION:    return gp((wg(p) > 127) ? 255 : 0);
      default:             return gp(wg(p));
    endcase
  endfunction

  function automatic logic [127:0] rx_word(int n);
    logic [127:0] w;
    for (int i = 0; i < 16; i++) w[8 * i +: 8] = rxq[16 * n + i];
    return w;
  endfunction

  task automatic run(alg_e a, int nwords_back);
    alg = a; rxq.delete();
    start = 1; @(posedge clk); #1 start = 0;
    while (!recv_ready) begin @(posedge clk); #1; end
    for (int i = 0; i < W * H; i++) begin
      host_send(img[i].blue); host_send(img[i].green); host_send(img[i].red); host_send(8'h30);
    end
    while (!done) begin @(posedge clk); #1; end
    repeat (12 * CPB) @(posedge clk);
    checks++;
    if (rxq.size() != 16 * nwords_back) begin
      failures++;
      $display("FAIL %s: %0d bytes back, expected %0d", a.name(), rxq.size(), 16 * nwords_back);
    end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m[int];
    longint ec, ee;
    for (int i = 0; i < W * H; i++) begin
      img[i] = $urandom;
      img[i].pad = 8'h30;
      if (i % 3 == 2) img[i] = img[i - 1];
    end
    img[0] = '{pad: 8'h30, red: 8'd250, green: 8'd250, blue: 8'd250};
    img[5] = '{pad: 8'h30, red: 8'd10, green: 8'd20, blue: 8'd5};
    alg = ALG_RED_CHANNEL;
    repeat (3) @(posedge clk); #1 rst = 0;
    init_btn = 1; @(posedge clk); #1 init_btn = 0;
    while (!dut.init_done) begin @(posedge clk); #1; end

    for (int a = 0; a <= int'(ALG_FOUR_GRAY_REG); a++) begin
      run(alg_e'(a), NW);
      for (int n = 0; n < NW && 16 * n + 15 < rxq.size(); n++) begin
        logic [127:0] e;
        for (int k = 0; k < 4; k++) e[32 * k +: 32] = model(alg_e'(a), img[4 * n + k]);
        checks++;
        if (rx_word(n) !== e) begin
          failures++;
          $display("FAIL %s word %0d got %h expected %h", alg.name(), n, rx_word(n), e);
        end
      end
    end
    for (int i = 0; i < W * H; i++) if (int'(img[i].red) * 2 + 64 > 255) n_clamp++;

    run(ALG_HPROJ, H);
    for (int l = 0; l < H && 16 * l + 15 < rxq.size(); l++) begin
      automatic int c = 0;
      for (int x = 0; x < W; x++) if (wg(img[l * W + x]) > 127) c++;
      checks++;
      if (rx_word(l) != 128'(c)) begin failures++; $display("FAIL line %0d count %0d expected %0d", l, rx_word(l), c); end
    end

    run(ALG_GLCM, 16385);
    for (int l = 0; l < H; l++)
      for (int x = 0; x + 1 < W; x++) begin
        automatic int a = wg(img[l * W + x]), b = wg(img[l * W + x + 1]);
        m[a * 256 + b] = m.exists(a * 256 + b) ? m[a * 256 + b] + 1 : 1;
        m[b * 256 + a] = m.exists(b * 256 + a) ? m[b * 256 + a] + 1 : 1;
        if (a == b) n_eq++; else n_neq++;
        if (x % 4 == 0) n_line_start += (x == 0); else if (x % 4 == 3) n_line_cont++;
      end
    ec = 0; ee = 0;
    foreach (m[key]) begin
      ec += longint'((key / 256 - key % 256) * (key / 256 - key % 256)) * m[key];
      ee += longint'(m[key]) * m[key];
    end
    for (int w = 0; w < 16384 && 16 * w + 15 < rxq.size(); w++) begin
      logic [127:0] e;
      for (int k = 0; k < 4; k++) e[32 * k +: 32] = m.exists(4 * w + k) ? 32'(m[4 * w + k]) : 32'd0;
      checks++;
      if (rx_word(w) !== e) begin
        failures++;
        if (failures < 10) $display("FAIL matrix word %0d got %h expected %h", w, rx_word(w), e);
      end
    end
    checks++;
    if (rxq.size() == 16 * 16385 && rx_word(16384) !== {ee[63:0], 16'd0, ec[47:0]}) begin
      failures++; $display("FAIL feature word %h", rx_word(16384));
    end
    checks++; if (glcm_contrast != ec[47:0] || glcm_energy != ee) failures++;
    checks++; if (u_mem.n_errors != 0) begin failures++; $display("FAIL DDR2 protocol errors"); end

    $display("mechanisms: refresh holds %0d, GLCM pairs x==y %0d x!=y %0d, line-start words %0d, mid-line words %0d, projection lines %0d, clamped pixels %0d, rx words %0d, tx words %0d",
             n_ref_hold, n_eq, n_neq, n_line_start, n_line_cont, n_hp_lines, n_clamp, n_rx_words, n_tx_words);
    checks += 9;
    if (n_ref_hold == 0)   begin failures++; $display("FAIL no refresh held a request"); end
    if (n_eq == 0)         begin failures++; $display("FAIL no x == y pair"); end
    if (n_neq == 0)        begin failures++; $display("FAIL no x != y pair"); end
    if (n_line_start == 0) begin failures++; $display("FAIL no line-start word"); end
    if (n_line_cont == 0)  begin failures++; $display("FAIL no mid-line word"); end
    if (n_hp_lines != H)   begin failures++; $display("FAIL projection lines"); end
    if (n_clamp == 0)      begin failures++; $display("FAIL no clamping"); end
    if (n_rx_words == 0)   begin failures++; $display("FAIL no rx words"); end
    if (n_tx_words == 0)   begin failures++; $display("FAIL no tx words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
