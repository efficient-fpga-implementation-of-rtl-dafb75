// tb_median_filter: streams three random 10 x 6 frames (with salt-and-pepper
// pixels) through the median filter with random input gaps and random output
// stalls, and compares every output with a reference: border pixels pass
// through, inner pixels take the median of the three row medians of their
// 3x3 neighbourhood. Also checks the output count per frame, the border
// flag and that the input is held off during each frame's flush.
module tb_median_filter;
  localparam int W = 10, H = 6, NF = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_border;
  logic [7:0] in_pix = 0, out_pix;
  int img [NF][H][W];
  int n_out = 0, n_flush_wait = 0, n_border = 0;

  median_filter #(.IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_pix(in_pix), .out_valid(out_valid), .out_ready(out_ready),
    .out_pix(out_pix), .out_border(out_border));

  always #5 clk = ~clk;

  function automatic int m3(int x, int y, int z);
    int lo = (x < y) ? x : y;
    int hi = (x < y) ? y : x;
    return (z <= lo) ? lo : (z >= hi) ? hi : z;
  endfunction

  function automatic int ref_pix(int f, int r, int c);
    if (r == 0 || c == 0 || r == H-1 || c == W-1) return img[f][r][c];
    return m3(m3(img[f][r-1][c-1], img[f][r-1][c], img[f][r-1][c+1]),
              m3(img[f][r][c-1],   img[f][r][c],   img[f][r][c+1]),
              m3(img[f][r+1][c-1], img[f][r+1][c], img[f][r+1][c+1]));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int f, r, c, e;
      f = n_out / (W*H); r = (n_out % (W*H)) / W; c = n_out % W;
      e = ref_pix(f, r, c);
      checks++;
      if (int'(out_pix) != e || out_border != (r == 0 || c == 0 || r == H-1 || c == W-1)) begin
        failures++;
        if (failures < 10) $display("FAIL f%0d (%0d,%0d) got %0d exp %0d", f, r, c, out_pix, e);
      end
      if (out_border) n_border++;
      n_out++;
    end
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          case ($urandom_range(0, 9))
            0: img[f][r][c] = 0;
            1: img[f][r][c] = 255;
            default: img[f][r][c] = $urandom_range(60, 180);
          endcase
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int p = 0; p < W*H; p++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_pix = 8'(img[f][p / W][p % W]);
        @(posedge clk);
        while (!in_ready) begin
          if (p == 0 && f > 0) n_flush_wait++;
          @(posedge clk);
        end
      end
    @(negedge clk); in_valid = 0;
    while (n_out < NF*W*H) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != NF*W*H) begin failures++; $display("FAIL count %0d", n_out); end
    checks++;
    if (n_flush_wait < 2) begin failures++; $display("FAIL no flush wait seen"); end
    checks++;
    if (n_border != NF*(2*W + 2*H - 4)) begin failures++; $display("FAIL border count %0d", n_border); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
