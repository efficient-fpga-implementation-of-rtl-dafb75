// cla_adder: W-bit carry look-ahead adder.
//
// The adder used everywhere in the pipeline (Haar transform, background
// subtraction, accumulator and multipliers). It is built from 4-bit
// look-ahead groups (cla4); a group's carry-in comes from the previous
// group's group generate/propagate, c_next = gg | pg & c. Widths that are
// not a multiple of four are padded with zeros at the top.
//
// Interface: sum = a + b + cin, cout is the carry out of bit W-1.
// Combinational, no clock.
// The 4-bit group follows the method's look-ahead equations; chaining groups
// for wider words is this design's choice.
module cla_adder #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int NG = (W + 3) / 4;
  localparam int WP = NG * 4;

  logic [WP-1:0] ap, bp, sp;
  logic [NG:0]   gc;                  // carry into each group
  logic [NG-1:0] gpg, ggg, gco;

  assign ap = WP'(a);
  assign bp = WP'(b);
  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    cla4 u_grp (
      .a (ap[4*k +: 4]),
      .b (bp[4*k +: 4]),
      .c0(gc[k]),
      .s (sp[4*k +: 4]),
      .c4(gco[k]),
      .pg(gpg[k]),
      .gg(ggg[k])
    );
    assign gc[k+1] = ggg[k] | (gpg[k] & gc[k]);
  end

  assign sum = sp[W-1:0];
  if (WP == W) begin : g_exact
    assign cout = gc[NG];
  end else begin : g_pad
    // Padding bits are zero, so the carry out of bit W-1 lands in sum bit W.
    assign cout = sp[W];
  end
endmodule
