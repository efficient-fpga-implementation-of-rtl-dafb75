// tb_window_3x3: shifts a random stream with random gaps through a window
// for 8-pixel rows and checks all nine taps against the stream history
// (a0 = newest sample, a3 = one row older, a6 = two rows older).
module tb_window_3x3;
  localparam int W = 8;
  int checks = 0, failures = 0;
  logic clk = 0, shift = 0;
  logic [7:0] pix = 0;
  logic [7:0] win [9];
  int hist[$];
  int off[9] = '{0, 1, 2, W, W+1, W+2, 2*W, 2*W+1, 2*W+2};

  window_3x3 #(.IMG_W(W)) dut (.clk(clk), .shift(shift), .pix(pix), .win(win));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 2) != 0);
      pix   = 8'($urandom);
      @(posedge clk);
      if (shift) hist.push_front(int'(pix));
      #1;
      if (hist.size() > 2*W + 2) begin
        for (int i = 0; i < 9; i++) begin
          checks++;
          if (int'(win[i]) != hist[off[i]]) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d a%0d=%0d exp %0d", n, i, win[i], hist[off[i]]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
