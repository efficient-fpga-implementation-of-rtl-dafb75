// vedic_mult2: 2x2 Urdhva-Tiryagbhyam multiplier, the leaf of the Vedic
// multiplier tree.
//
// Vertically: m0 = a0 b0. Crosswise: a1 b0 + a0 b1 through a half adder.
// Vertically again: a1 b1 plus that carry through a second half adder.
// Combinational.
module vedic_mult2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] m
);
  logic c1;
  always_comb begin
    m[0] = a[0] & b[0];
    m[1] = (a[1] & b[0]) ^ (a[0] & b[1]);
    c1   = (a[1] & b[0]) & (a[0] & b[1]);
    m[2] = (a[1] & b[1]) ^ c1;
    m[3] = (a[1] & b[1]) & c1;
  end
endmodule
