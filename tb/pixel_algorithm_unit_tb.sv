// pixel_algorithm_unit_tb: for every per-pixel algorithm, random words are
// processed and each of the four output pixels is compared with a reference
// computed here from the algorithm's formula. Non-pixel algorithm codes
// must pass the word through.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module pixel_algorithm_unit_tb;
  import imgproc_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  alg_e alg;
  logic [7:0] ref_val, contrast, bright, threshold;
  word4_t win, wout;
  int checks = 0, failures = 0;
  int per_alg[11];

  always #5 clk = ~clk;

  pixel_algorithm_unit dut (.clk, .rst, .en, .alg, .ref_val, .contrast, .bright, .threshold,
                            .word_in(win), .word_out(wout));

  function automatic int wg(pixel_t p);
    return (int'(p.red) * 306 + int'(p.green) * 601 + int'(p.blue) * 117 + 512) / 1024;
  endfunction
  function automatic logic [7:0] bc(int c);
    int v = c * int'(contrast) + int'(bright);
    return (v > 255) ? 8'd255 : 8'(v);
  endfunction
  function automatic logic [7:0] ad(int a, int b);
    return 8'((a > b) ? a - b : b - a);
  endfunction
  function automatic pixel_t gp(int g, pixel_t p);
    return '{pad: p.pad, red: 8'(g), green: 8'(g), blue: 8'(g)};
  endfunction

  function automatic pixel_t model(alg_e a, pixel_t p);
    case (a)
      ALG_RED_CHANNEL:     return gp(p.red, p);
      ALG_GREEN_CHANNEL:   return gp(p.green, p);
      ALG_NEGATIVE:        return '{pad: p.pad, red: ad(ref_val, p.red), green: ad(ref_val, p.green), blue: ad(ref_val, p.blue)};
      ALG_BRIGHT_CONTRAST: return '{pad: p.pad, red: bc(p.red), green: bc(p.green), blue: bc(p.blue)};
      ALG_SIMPLE_GRAY:     return gp(((int'(p.red) + p.green + p.blue) * 683 + 1024) / 2048, p);
      ALG_WEIGHTED_GRAY, ALG_FOUR_GRAY, ALG_FOUR_GRAY_REG: return gp(wg(p), p);
      ALG_BINARIZATION:    return gp((wg(p) > threshold) ? 255 : 0, p);
      default:             return p;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    win = '0; alg = ALG_RED_CHANNEL; ref_val = 255; contrast = 2; bright = 64; threshold = 127;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 1100; n++) begin
      alg = alg_e'(n % 11);
      ref_val = 8'($urandom); contrast = 8'($urandom_range(3)); bright = 8'($urandom_range(100));
      threshold = 8'($urandom);
      for (int k = 0; k < 4; k++) win[k] = $urandom;
      en = 1;
      @(posedge clk); #1;
      en = 0;
      for (int k = 0; k < 4; k++) begin
        automatic pixel_t e = model(alg, win[k]);
        checks++;
        if (wout[k] !== e) begin
          failures++;
          $display("FAIL %s lane %0d in %h out %h expected %h", alg.name(), k, win[k], wout[k], e);
        end
      end
      per_alg[int'(alg)]++;
      // result holds until the next en
      win = ~win;
      @(posedge clk); #1;
      checks++;
      if (wout[0] !== model(alg, ~win[0])) begin failures++; $display("FAIL %s result did not hold", alg.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
