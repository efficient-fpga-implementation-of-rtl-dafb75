// tb_adaptive_threshold: runs six 8 x 8 frames of random pixel pairs with
// random gaps through the WMSE unit and checks, after each frame, that
// wmse = sum((a-b)^2) >> (3 + log2(64)) and thr = wmse + ll2, that
// wmse_update pulses once per frame, and that the value holds in between.
module tb_adaptive_threshold;
  localparam int W = 8, H = 8, NPIX = W * H, SHIFT = 3 + 6, NF = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, wmse_update;
  logic [7:0] img1 = 0, img2 = 0, ll2 = 0;
  logic [12:0] wmse;
  logic [13:0] thr;
  longint sum;
  int exp_wmse, n_upd = 0;

  adaptive_threshold #(.IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .img1(img1), .img2(img2),
    .ll2(ll2), .wmse(wmse), .thr(thr), .wmse_update(wmse_update));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && wmse_update) n_upd++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      sum = 0;
      // frame 0 uses large differences so the WMSE is far from zero
      for (int p = 0; p < NPIX; p++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        img1 = 8'($urandom);
        img2 = (f == 0) ? ~img1 : 8'($urandom);
        sum += (int'(img1) - int'(img2)) * (int'(img1) - int'(img2));
        if (p == NPIX/2) begin
          // mid-frame: the previous frame's value must still be there
          checks++;
          if (f > 0 && int'(wmse) != exp_wmse) begin
            failures++; $display("FAIL mid-frame wmse changed");
          end
        end
      end
      @(negedge clk); in_valid = 0;
      exp_wmse = int'(sum >> SHIFT);
      ll2 = 8'($urandom);
      @(negedge clk);
      checks++;
      if (int'(wmse) != exp_wmse || int'(thr) != exp_wmse + int'(ll2)) begin
        failures++;
        $display("FAIL frame %0d wmse %0d exp %0d thr %0d", f, wmse, exp_wmse, thr);
      end
    end
    checks++;
    if (n_upd != NF) begin failures++; $display("FAIL updates %0d", n_upd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
