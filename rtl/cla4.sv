// cla4: 4-bit carry look-ahead group.
//
// Each bit forms a propagate p_i = a_i ^ b_i and a generate g_i = a_i & b_i;
// the four internal carries are computed in parallel from c0 by the expanded
// recurrence c_{i+1} = g_i | p_i & c_i, and each sum bit is s_i = p_i ^ c_i.
// The group propagate (pg) and generate (gg) let a wider adder look ahead
// across groups. Purely combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c0,
  output logic [3:0] s,
  output logic       c4,
  output logic       pg,
  output logic       gg
);
  logic [3:0] p, g;
  logic [3:0] c;

  always_comb begin
    p = a ^ b;
    g = a & b;
    c[0] = c0;
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    pg   = &p;
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    c4   = gg | (pg & c0);
    s    = p ^ c;
  end
endmodule
