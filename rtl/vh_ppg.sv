// vh_ppg: partial product generator (layer 1, vertical 2-bit BCSE).
//
// A 2-bit binary common sub-expression (BCS) of the coefficient can only be
// "00", "01", "10" or "11". Their partial products are 0, X/2, X and
// X + X/2; only the last needs an adder (A0, 17 bits), the others are wiring.
// Because the sample X is common to every coefficient of a filter, one PPG
// serves all coefficient branches: this is the vertical elimination across
// adjacent coefficients. The shifted copies P8..P1 that each coefficient
// needs are taken from these outputs by hard-wired right shifts in the
// multiplexer unit.
//
// Interface: xm is the 16-bit sample magnitude; pp carries the three
// non-zero partial products, each 17 bits wide. X/2 drops the LSB of X
// (truncation), as the fixed-width shifts in the document do.
// Purely combinational.
module vh_ppg
  import vh_pkg::*;
(
  input  logic [XW-1:0] xm,
  output ppg_t          pp
);

  always_comb begin
    pp.xh = pp_t'(xm) >> 1;
    pp.xf = pp_t'(xm);
    pp.x1 = pp_t'(xm) + (pp_t'(xm) >> 1);   // adder A0
  end

endmodule
