// tb_negative_transform: checks out = 255 - pixel for every pixel value.
module tb_negative_transform;
  int checks = 0, failures = 0;
  logic [7:0] pix, out;

  negative_transform dut (.pix(pix), .out(out));

  initial begin
    #1s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      pix = 8'(x);
      #1;
      checks++;
      if (int'(out) != 255 - x) begin
        failures++;
        $display("FAIL 255-%0d -> %0d", x, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
