// tb_hd_controller: drives input and output strobes for two small frames
// and checks in_last, the output coordinates, out_last, the frame count and
// busy.
module tb_hd_controller;
  localparam int IN_PIX = 12, OW = 3, OH = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_fire = 0, out_fire = 0;
  logic in_last, out_last, busy;
  logic [1:0] out_x;
  logic [0:0] out_y;
  logic [15:0] frame_count;

  hd_controller #(.IN_PIX(IN_PIX), .OUT_W(OW), .OUT_H(OH)) dut (
    .clk(clk), .rst_n(rst_n), .in_fire(in_fire), .out_fire(out_fire),
    .in_last(in_last), .out_x(out_x), .out_y(out_y), .out_last(out_last),
    .frame_count(frame_count), .busy(busy));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy, "busy after reset");
    for (int f = 0; f < 2; f++) begin
      for (int p = 0; p < IN_PIX; p++) begin
        in_fire = 1;
        #1 chk(in_last == (p == IN_PIX - 1), "in_last");
        @(negedge clk);
        in_fire = 0;
        chk(busy, "busy while frame inside");
        @(negedge clk);
      end
      for (int p = 0; p < OW*OH; p++) begin
        out_fire = 1;
        #1;
        chk(int'(out_x) == p % OW && int'(out_y) == p / OW, "coordinates");
        chk(out_last == (p == OW*OH - 1), "out_last");
        @(negedge clk);
        out_fire = 0;
        if (p < OW*OH - 1) chk(busy, "busy before last output");
      end
      chk(!busy, "idle after frame");
      chk(int'(frame_count) == f + 1, "frame count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
