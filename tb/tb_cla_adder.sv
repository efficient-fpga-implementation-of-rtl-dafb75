// tb_cla_adder: checks the carry look-ahead adder against integer addition,
// at a width that is a multiple of four (8, exhaustively with both carry-in
// values) and one that is not (13, random operands).
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        c8, co8;
  logic [12:0] a13, b13, s13;
  logic        c13, co13;

  cla_adder #(.W(8))  u8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  cla_adder #(.W(13)) u13 (.a(a13), .b(b13), .cin(c13), .sum(s13), .cout(co13));

  initial begin
    #1s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          a8 = 8'(x); b8 = 8'(y); c8 = ci[0];
          #1;
          checks++;
          if ({co8, s8} !== 9'(x + y + ci)) begin
            failures++;
            if (failures < 10) $display("FAIL W=8 %0d+%0d+%0d -> %0d", x, y, ci, {co8, s8});
          end
        end
    for (int n = 0; n < 20000; n++) begin
      a13 = 13'($urandom); b13 = 13'($urandom); c13 = 1'($urandom);
      #1;
      checks++;
      if ({co13, s13} !== 14'(a13) + 14'(b13) + 14'(c13)) begin
        failures++;
        if (failures < 10) $display("FAIL W=13 %0d+%0d+%0d", a13, b13, c13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
