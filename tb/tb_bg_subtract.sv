// tb_bg_subtract: exhaustive check of |fg - bg| for all 8-bit pairs.
module tb_bg_subtract;
  int checks = 0, failures = 0;
  logic [7:0] fg, bg, diff;

  bg_subtract dut (.fg(fg), .bg(bg), .diff(diff));

  initial begin
    #1s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        fg = 8'(x); bg = 8'(y);
        #1;
        checks++;
        if (int'(diff) != ((x > y) ? x - y : y - x)) begin
          failures++;
          if (failures < 10) $display("FAIL |%0d-%0d| -> %0d", x, y, diff);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
