// bg_subtract: modified background subtraction, |foreground - background|.
//
// The background pixel is inverted (NOT gates) and a carry look-ahead adder
// adds 1 to form its two's complement; a second look-ahead adder adds the
// foreground pixel. Both work on PIX_W+1 bits so that the sign of the
// difference is kept. The modulus stage negates a negative difference
// (invert, then a third adder adds 1). Combinational.
// The NOT / add-one / add structure follows the method; the 9-bit width and
// the way the modulus is formed are this design's choices.
module bg_subtract (
  input  hd_pkg::pix_t fg,
  input  hd_pkg::pix_t bg,
  output hd_pkg::pix_t diff
);
  import hd_pkg::*;

  localparam int W = PIX_W + 1;

  logic [W-1:0] neg_bg, d, neg_d;
  logic         co0, co1, co2;

  cla_adder #(.W(W)) u_twos (
    .a(~{1'b0, bg}), .b(W'(1)), .cin(1'b0), .sum(neg_bg), .cout(co0));
  cla_adder #(.W(W)) u_sub (
    .a({1'b0, fg}), .b(neg_bg), .cin(1'b0), .sum(d), .cout(co1));
  cla_adder #(.W(W)) u_mod (
    .a(~d), .b(W'(1)), .cin(1'b0), .sum(neg_d), .cout(co2));

  assign diff = d[W-1] ? neg_d[PIX_W-1:0] : d[PIX_W-1:0];
endmodule
