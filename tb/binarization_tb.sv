// binarization_tb: exhaustive over colour and reference: 255 when colour is
// above the reference, 0 otherwise.
// The stimulus, the reference model in this file and the pass criteria
// are this testbench's own; the expected behaviour, and any example values
// named above, come from the original design.
module binarization_tb;
  logic [7:0] color, ref_val, out_val;
  int checks = 0, failures = 0;

  binarization dut (.color, .ref_val, .out_val);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++)
      for (int r = 0; r < 256; r++) begin
        color = 8'(c); ref_val = 8'(r);
        #1;
        checks++;
        if (out_val != ((c > r) ? 8'd255 : 8'd0)) begin
          failures++;
          if (failures < 10) $display("FAIL color=%0d ref=%0d out=%0d", c, r, out_val);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
