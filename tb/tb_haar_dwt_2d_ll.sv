// tb_haar_dwt_2d_ll: sends two random 8 x 6 frames with random gaps and
// checks the LL band in raster order, LL = ((a+b)/2 + (c+d)/2)/2 of each 2x2
// block with the row halvings done first; checks frame_done on the last LL
// sample, that the input is refused while the column pass runs, and that
// the column pass takes (W/2)*H reads plus two clocks of pipeline.
module tb_haar_dwt_2d_ll;
  localparam int W = 8, H = 6, NF = 2;
  localparam int NL = (W/2) * H;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, frame_done, col_pass;
  logic [7:0] in_pix = 0, out_pix;
  int img [NF][H][W];
  int n_out = 0, busy_cycles = 0, n_col = 0;
  logic col_q = 0;

  haar_dwt_2d_ll #(.IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_pix(in_pix), .out_valid(out_valid), .out_pix(out_pix),
    .frame_done(frame_done), .col_pass(col_pass));

  always #5 clk = ~clk;

  function automatic int ll(int f, int i, int j);
    int l0 = (img[f][2*i][2*j]   + img[f][2*i][2*j+1]) / 2;
    int l1 = (img[f][2*i+1][2*j] + img[f][2*i+1][2*j+1]) / 2;
    return (l0 + l1) / 2;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (!in_ready) busy_cycles++;
      if (col_pass && !col_q) n_col++;
      col_q <= col_pass;
      if (!col_pass && col_q) begin
        checks++;
        if (busy_cycles != NL + 2) begin
          failures++;
          $display("FAIL column pass took %0d cycles, exp %0d", busy_cycles, NL + 2);
        end
        busy_cycles = 0;
      end
      if (out_valid) begin
        int f, i, j, e;
        f = n_out / (NL/2); i = (n_out % (NL/2)) / (W/2); j = n_out % (W/2);
        e = ll(f, i, j);
        checks++;
        if (int'(out_pix) != e || frame_done != (n_out % (NL/2) == NL/2 - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL f%0d (%0d,%0d) got %0d exp %0d done=%0d", f, i, j, out_pix, e, frame_done);
        end
        n_out++;
      end
    end
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) img[f][r][c] = $urandom_range(0, 255);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int p = 0; p < W*H; p++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_pix = 8'(img[f][p / W][p % W]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    @(negedge clk); in_valid = 0;
    repeat (NL + 10) @(posedge clk);
    checks++;
    if (n_out != NF*NL/2 || n_col != NF) begin
      failures++;
      $display("FAIL outputs %0d column passes %0d", n_out, n_col);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
