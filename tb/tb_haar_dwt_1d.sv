// tb_haar_dwt_1d: feeds a random sample stream with random gaps and checks
// every output against (a + b) / 2 of the matching pair, one clock after the
// pair's second sample; also checks that `clear` restarts pairing.
module tb_haar_dwt_1d;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_valid;
  logic [7:0] in_pix = 0, out_pix;
  int exp_q[$];
  int held, have, n_out;

  haar_dwt_1d dut (.clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
                   .in_pix(in_pix), .out_valid(out_valid), .out_pix(out_pix));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output of the pair completed on the previous edge
  logic exp_v = 0;
  int   exp_val;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != exp_v || (exp_v && int'(out_pix) != exp_val)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t v=%0d/%0d pix=%0d exp=%0d", $time, out_valid, exp_v, out_pix, exp_val);
      end
      if (out_valid) n_out++;
    end
  end

  initial begin
    have = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_pix   = 8'($urandom);
      clear    = (n == 2001) || (n == 3002);
      @(posedge clk);
      exp_v <= 1'b0;
      if (clear) have = 0;
      else if (in_valid) begin
        if (have == 0) begin held = in_pix; have = 1; end
        else begin exp_v <= 1'b1; exp_val <= (held + in_pix) / 2; have = 0; end
      end
    end
    @(negedge clk); in_valid = 0; clear = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_out < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
