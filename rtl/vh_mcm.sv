// vh_mcm: multiple constant multiplication block.
//
// Multiplies one sample X by NCOEF reconfigurable coefficients at once, as
// the multiplier section of an FIR filter does. The sample goes through one
// sign conversion block and one partial product generator (adder A0), whose
// outputs every coefficient branch (vh_cm) shares: this is the vertical
// elimination of the 2-bit sub-expressions across the coefficients. Each
// branch then does its own horizontal 4-bit and 8-bit elimination. The
// sharing follows the document's 8-tap symmetric filter example
// (NCOEF = 4 distinct coefficients H0..H3).
//
// Interface: x (16-bit two's complement), h[NCOEF] (17-bit coefficients),
// y[NCOEF] (16-bit products), ctrl[NCOEF] (control signals, for
// observation). Purely combinational.
module vh_mcm
  import vh_pkg::*;
#(
  parameter int unsigned NCOEF = 4
) (
  input  sample_t  x,
  input  coef_t    h    [NCOEF],
  output product_t y    [NCOEF],
  output ctrl_t    ctrl [NCOEF]
);

  logic           x_neg;
  logic [XW-2:0]  x_mag;
  ppg_t           pp;

  vh_sign_conv #(.W(XW)) u_xsign (.din(x), .sign(x_neg), .mag(x_mag));

  vh_ppg u_ppg (.xm(XW'(x_mag)), .pp(pp));

  for (genvar i = 0; i < NCOEF; i++) begin : g_cm
    vh_cm u_cm (.pp(pp), .x_neg(x_neg), .h(h[i]), .y(y[i]), .ctrl(ctrl[i]));
  end

endmodule
