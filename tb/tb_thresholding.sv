// tb_thresholding: checks that a pixel survives only when it is strictly
// above the threshold, over all pixel values and thresholds 0..300.
module tb_thresholding;
  int checks = 0, failures = 0;
  logic [7:0]  pix, out;
  logic [13:0] thr;
  logic        kept;

  thresholding #(.THR_W(14)) dut (.pix(pix), .thr(thr), .out(out), .kept(kept));

  initial begin
    #1s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t <= 300; t++)
      for (int x = 0; x < 256; x++) begin
        pix = 8'(x); thr = 14'(t);
        #1;
        checks++;
        if (int'(out) != ((x > t) ? x : 0) || kept != (x > t)) begin
          failures++;
          if (failures < 10) $display("FAIL pix=%0d thr=%0d -> %0d", x, t, out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
