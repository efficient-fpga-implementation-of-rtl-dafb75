// vedic_mult4: 4x4 Urdhva-Tiryagbhyam (Vedic) multiplier built from four
// 2x2 Vedic multipliers and three carry look-ahead adders.
//
// With the operands split in halves (aH, aL, bH, bL), the four partial
// products are q3 = aH*bH, q2 = aH*bL, q1 = aL*bH and q0 = aL*bL. The low
// 2 bits of the product are q0's low bits, taken directly. One adder forms
// (q3 << 2) + q2, a second forms q1 + (q0 >> 2), and a third adds the two to
// give product bits [7:2]. No adder can overflow at these widths.
// Combinational.
// The four-multiplier, three-adder arrangement follows the method's
// figure; the exact pairing of partial products per adder is this design's
// reading of it.
module vedic_mult4 (
  input  logic [4-1:0]   a,
  input  logic [4-1:0]   b,
  output logic [2*4-1:0] m
);
  localparam int N = 4;
  localparam int H = N / 2;

  logic [N-1:0]   q0, q1, q2, q3;
  logic [N+H-1:0] t_left, t_hi;
  logic [N-1:0]   t_right;
  logic           co_l, co_r, co_f;

  vedic_mult2 u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .m(q3));
  vedic_mult2 u_q2 (.a(a[N-1:H]), .b(b[H-1:0]), .m(q2));
  vedic_mult2 u_q1 (.a(a[H-1:0]), .b(b[N-1:H]), .m(q1));
  vedic_mult2 u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .m(q0));

  cla_adder #(.W(N+H)) u_add_l (
    .a({q3, {H{1'b0}}}), .b((N+H)'(q2)), .cin(1'b0), .sum(t_left), .cout(co_l));
  cla_adder #(.W(N)) u_add_r (
    .a(q1), .b(N'(q0[N-1:H])), .cin(1'b0), .sum(t_right), .cout(co_r));
  cla_adder #(.W(N+H)) u_add_f (
    .a(t_left), .b((N+H)'(t_right)), .cin(1'b0), .sum(t_hi), .cout(co_f));

  assign m = {t_hi, q0[H-1:0]};
endmodule
