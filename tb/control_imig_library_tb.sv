// control_imig_library_tb: every library algorithm run through the main
// controller on a 640x48 image, the size the per-pixel library was timed
// with. The controller is built with IMG_H = 48 (IMG_W stays at 640) and is
// connected to the memory interface controller, the behavioural DDR2 model
// and the algorithm unit. For each of the ten library algorithms (red and
// green channel, negative, bright/contrast, simple and weighted grayscale,
// binarization, four grayscales with and without register, horizontal
// projection) the image is sent, every returned word is compared with the
// algorithm's formula, and the clocks from the last image word stored to
// the first result word are printed.
// The testbench stands in for the UART helpers (direct word transfers, no
// serial time). Settings: negative reference 255, contrast 2, bright 64,
// threshold 127 (the values of the original example runs). The image is
// pseudo-random. The refresh period of the model is 975 clocks (7.8 us at
// 125 MHz), a usual DDR2 value, not one given by the original.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour comes from the original
// design.
module control_imig_library_tb;
  import imgproc_pkg::*;
  localparam int W = 640, H = 48, NW = W * H / 4;
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

  control_imig #(.IMG_W(W), .IMG_H(H)) dut (.*);

  imig u_imig (.clk, .rst, .init_start, .init_done, .wr_req, .wr_ack, .rd_req, .rd_ack,
    .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata), .mig_cmd, .mig_addr, .mig_wdata,
    .mig_burst_done, .mig_init_done, .mig_cmd_ack, .mig_data_valid, .mig_rdata, .mig_auto_ref_req);

  mig_ddr2_model #(.REF_PERIOD(975)) u_mem (
    .clk, .rst, .cmd(mig_cmd), .addr(mig_addr), .wdata(mig_wdata), .burst_done(mig_burst_done),
    .init_done(mig_init_done), .cmd_ack(mig_cmd_ack), .data_valid(mig_data_valid),
    .rdata(mig_rdata), .auto_ref_req(mig_auto_ref_req));

  pixel_algorithm_unit u_alg (.clk, .rst, .en(alg_en), .alg, .ref_val(8'd255), .contrast(8'd2),
    .bright(8'd64), .threshold, .word_in(alg_word), .word_out(alg_result));

  // transmit helper stand-in: four-phase acknowledge, collects the words
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
  function automatic logic [7:0] bc(int c);
    int v = c * 2 + 64;
    return (v > 255) ? 8'd255 : 8'(v);
  endfunction
  function automatic pixel_t gp(int g, pixel_t p);
    return '{pad: p.pad, red: 8'(g), green: 8'(g), blue: 8'(g)};
  endfunction
  function automatic pixel_t model(alg_e a, pixel_t p);
    case (a)
      ALG_RED_CHANNEL:     return gp(p.red, p);
      ALG_GREEN_CHANNEL:   return gp(p.green, p);
      ALG_NEGATIVE:        return '{pad: p.pad, red: ~p.red, green: ~p.green, blue: ~p.blue};
      ALG_BRIGHT_CONTRAST: return '{pad: p.pad, red: bc(p.red), green: bc(p.green), blue: bc(p.blue)};
      ALG_SIMPLE_GRAY:     return gp(((int'(p.red) + p.green + p.blue) * 683 + 1024) / 2048, p);
      ALG_BINARIZATION:    return gp((wg(p) > threshold) ? 255 : 0, p);
      default:             return gp(wg(p), p);
    endcase
  endfunction

  task automatic run(alg_e a);
    alg = a; sent.delete(); tx_seen = 0;
    start = 1; @(posedge clk); #1 start = 0;
    for (int n = 0; n < NW; n++) begin
      while (!recv_ready) begin @(posedge clk); #1; end
      rx_word = {img[4 * n + 3], img[4 * n + 2], img[4 * n + 1], img[4 * n]};
      rx_word_valid = 1; @(posedge clk); #1 rx_word_valid = 0;
    end
    while (!recv_ready && !tx_seen) begin @(posedge clk); #1; end
    t_stored = cycle;
    while (!done) begin @(posedge clk); #1; end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W * H; i++) begin
      img[i] = $urandom;
      img[i].pad = 8'h00;
    end
    alg = ALG_RED_CHANNEL; rx_word = '0;
    repeat (3) @(posedge clk); #1 rst = 0;

    for (int a = int'(ALG_RED_CHANNEL); a <= int'(ALG_HPROJ); a++) begin
      automatic int bad = 0;
      run(alg_e'(a));
      $display("%-20s %0dx%0d: %0d clocks from image stored to first result word",
               alg.name(), W, H, t_first - t_stored);
      if (alg == ALG_HPROJ) begin
        checks++; if (sent.size() != H) begin failures++; $display("FAIL %0d line words", sent.size()); end
        for (int l = 0; l < H && l < sent.size(); l++) begin
          automatic int c = 0;
          for (int x = 0; x < W; x++) if (wg(img[l * W + x]) > threshold) c++;
          checks++;
          if (sent[l] !== 128'(c)) begin
            failures++; bad++;
            if (bad < 5) $display("FAIL line %0d got %0d expected %0d", l, sent[l], c);
          end
        end
      end else begin
        checks++; if (sent.size() != NW) begin failures++; $display("FAIL %0d words sent", sent.size()); end
        for (int n = 0; n < NW && n < sent.size(); n++) begin
          logic [127:0] e;
          for (int k = 0; k < 4; k++) e[32 * k +: 32] = model(alg, img[4 * n + k]);
          checks++;
          if (sent[n] !== e) begin
            failures++; bad++;
            if (bad < 5) $display("FAIL %s word %0d got %h expected %h", alg.name(), n, sent[n], e);
          end
        end
      end
    end
    checks++; if (u_mem.n_errors != 0) begin failures++; $display("FAIL protocol errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
