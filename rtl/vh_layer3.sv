// vh_layer3: controlled addition at layer 3 (horizontal 8-bit BCSE).
//
// The four nibble sums are added in pairs: AS5 = AS1 + AS2 (adder A5, upper
// byte Hm[15:8]) and AS6 = AS3 + AS4 (adder A6, lower byte Hm[7:0]). When the
// two bytes of the coefficient magnitude are equal (control c7), the lower
// byte's sum is the upper byte's sum shifted right by 8 bits, and A6 is idle:
//   AS6 = c7 ? AS5>>8 : AS3 + AS4
// This follows the document; zeroing A6's operands while it is idle is this
// design's way of making the addition "controlled".
//
// Widths: AS5 17 bits, AS6 9 bits. Purely combinational.
module vh_layer3
  import vh_pkg::*;
(
  input  logic [PPW-1:0]  as1,
  input  logic [AS2W-1:0] as2,
  input  logic [AS3W-1:0] as3,
  input  logic [AS4W-1:0] as4,
  input  logic            c7,
  output logic [PPW-1:0]  as5,
  output logic [AS6W-1:0] as6
);

  logic [AS6W-1:0] a6;

  always_comb begin
    as5 = as1 + PPW'(as2);                                   // adder A5
    a6  = (c7 ? '0 : AS6W'(as3)) + (c7 ? '0 : AS6W'(as4));   // adder A6
    as6 = c7 ? AS6W'(as5 >> 8) : a6;
  end

endmodule
