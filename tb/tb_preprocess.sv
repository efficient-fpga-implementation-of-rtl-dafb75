// tb_preprocess: converts two random 11 x 7 colour frames to grey and
// resizes them to 8 x 4, with random input gaps and output stalls. Checks
// each output against Y = (77R + 150G + 29B) >> 8 of the source pixel that
// nearest-neighbour decimation selects (column x kept when
// floor((x+1)*8/11) > floor(x*8/11), rows likewise), and the output count.
// A second instance at equal sizes must pass every pixel.
module tb_preprocess;
  localparam int SW = 11, SH = 7, DW = 8, DH = 4, NF = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0, dropped;
  logic [7:0] out_pix;
  hd_pkg::rgb_t in_rgb;
  int exp_q[$];
  int n_out = 0, n_drop = 0;

  preprocess #(.SRC_W(SW), .SRC_H(SH), .DST_W(DW), .DST_H(DH)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_rgb(in_rgb), .out_valid(out_valid), .out_ready(out_ready),
    .out_pix(out_pix), .dropped(dropped));

  // identity-size instance: every pixel is kept
  logic i_in_ready, i_out_valid, i_dropped;
  logic [7:0] i_out_pix;
  int n_id = 0;
  preprocess #(.SRC_W(4), .SRC_H(3), .DST_W(4), .DST_H(3)) dut_id (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(i_in_ready),
    .in_rgb(in_rgb), .out_valid(i_out_valid), .out_ready(1'b1),
    .out_pix(i_out_pix), .dropped(i_dropped));

  always #5 clk = ~clk;

  function automatic int luma(hd_pkg::rgb_t p);
    return (77 * int'(p.r) + 150 * int'(p.g) + 29 * int'(p.b)) >> 8;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        checks++;
        if (exp_q.size() == 0 || int'(out_pix) != exp_q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d got %0d exp %0d", n_out, out_pix, exp_q.size() ? exp_q[0] : -1);
        end
        if (exp_q.size()) void'(exp_q.pop_front());
        n_out++;
      end
      if (dropped) n_drop++;
      if (i_out_valid) n_id++;
    end
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < SH; y++)
        for (int x = 0; x < SW; x++) begin
          @(negedge clk);
          in_valid = 1;
          in_rgb = hd_pkg::rgb_t'($urandom);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          if (((x+1)*DW/SW > x*DW/SW) && ((y+1)*DH/SH > y*DH/SH))
            exp_q.push_back(luma(in_rgb));
        end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != NF*DW*DH || n_drop != NF*(SW*SH - DW*DH)) begin
      failures++; $display("FAIL counts out %0d drop %0d", n_out, n_drop);
    end
    checks++;
    if (n_id == 0) begin failures++; $display("FAIL identity instance silent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
