// vh_cm: VHBCSE constant multiplier for one coefficient.
//
// Multiplies the sample whose partial products the shared PPG has made by
// one reconfigurable coefficient H (17-bit two's complement fraction H/2^16)
// and gives Y = X*H/2^16 as a 16-bit two's complement integer.
//
//   sign conversion   Hm = H[16] ? ~H[15:0] : H[15:0]
//   control generator c1..c6 nibble equalities, c7 byte equality of Hm
//   multiplexer unit  eight 4:1 muxes, P8..P1 (layer 1, vertical 2-bit BCSE)
//   layer 2           AS1..AS4, nibble sums, reused when nibbles match
//   layer 3           AS5, AS6, byte sums, AS6 reused when bytes match
//   layer 4           S = AS5 + AS6, magnitude Ym = S>>1
//   sign restore      Y = (x_neg ^ H[16]) ? ~Ym : Ym
//
// The chain up to layer 4 is the document's. The sign restore at the output
// is this design's: the magnitudes carry a 1's complement offset when
// negative, and taking the 1's complement of the result gives a product
// within a few LSBs of floor(X*H/2^16).
//
// Interface: pp (shared PPG outputs) and x_neg (sample sign) from the PPG
// side, h the coefficient, y the product; ctrl exposes the control signals
// for observation. Purely combinational: no clock, no latency.
module vh_cm
  import vh_pkg::*;
(
  input  ppg_t     pp,
  input  logic     x_neg,
  input  coef_t    h,
  output product_t y,
  output ctrl_t    ctrl
);

  logic            h_neg;
  coef_mag_t       hm;
  pp_set_t         p;
  logic [PPW-1:0]  as1, as5;
  logic [AS2W-1:0] as2;
  logic [AS3W-1:0] as3;
  logic [AS4W-1:0] as4;
  logic [AS6W-1:0] as6;
  product_t        ym;

  vh_sign_conv #(.W(HW)) u_sign (.din(h), .sign(h_neg), .mag(hm));

  vh_ctrl_gen u_ctrl (.hm(hm), .c(ctrl));

  vh_mux_unit u_mux (.hm(hm), .pp(pp), .p(p));

  vh_layer2 u_l2 (
    .p(p), .c(ctrl[6:1]),
    .as1(as1), .as2(as2), .as3(as3), .as4(as4)
  );

  vh_layer3 u_l3 (
    .as1(as1), .as2(as2), .as3(as3), .as4(as4), .c7(ctrl[7]),
    .as5(as5), .as6(as6)
  );

  vh_layer4 u_l4 (.as5(as5), .as6(as6), .ym(ym));

  always_comb y = (x_neg ^ h_neg) ? ~ym : ym;

endmodule
