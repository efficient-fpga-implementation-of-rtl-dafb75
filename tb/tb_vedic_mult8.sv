// tb_vedic_mult8: exhaustive check of the 8x8 Vedic multiplier against
// integer multiplication.
module tb_vedic_mult8;
  int checks = 0, failures = 0;
  logic [8-1:0]   a, b;
  logic [2*8-1:0] m;

  vedic_mult8 dut (.a(a), .b(b), .m(m));

  initial begin
    #1s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << 8); x++)
      for (int y = 0; y < (1 << 8); y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        checks++;
        if (int'(m) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d -> %0d", x, y, m);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
