// vh_ctrl_gen: control logic (CL) generator.
//
// Looks for horizontal common sub-expressions inside one coefficient
// magnitude Hm. The 16 bits are split into four nibbles N3 = Hm[15:12],
// N2 = Hm[11:8], N1 = Hm[7:4], N0 = Hm[3:0], and the six pairwise
// equalities give the layer-2 controls:
//   c[1] N3==N2   c[2] N3==N1   c[3] N3==N0
//   c[4] N2==N1   c[5] N2==N0   c[6] N1==N0
// The 8-bit check Hm[15:8]==Hm[7:0] is built from two nibble checks,
// c[7] = c[2] & c[5], as the document describes. Which nibble pairs map to
// c[1]..c[6] is this design's own numbering.
//
// Interface: hm (16 bits) in, c[7:1] out. Purely combinational.
module vh_ctrl_gen
  import vh_pkg::*;
(
  input  coef_mag_t hm,
  output ctrl_t     c
);

  logic [3:0] n3, n2, n1, n0;

  always_comb begin
    n3 = hm[15:12];
    n2 = hm[11:8];
    n1 = hm[7:4];
    n0 = hm[3:0];
    c[1] = (n3 == n2);
    c[2] = (n3 == n1);
    c[3] = (n3 == n0);
    c[4] = (n2 == n1);
    c[5] = (n2 == n0);
    c[6] = (n1 == n0);
    c[7] = c[2] & c[5];
  end

endmodule
