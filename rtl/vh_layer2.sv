// vh_layer2: controlled addition at layer 2 (horizontal 4-bit BCSE).
//
// The eight partial products are added in pairs, one pair per coefficient
// nibble: AS1 = P8+P7 (Hm[15:12]), AS2 = P6+P5 (Hm[11:8]),
// AS3 = P4+P3 (Hm[7:4]), AS4 = P2+P1 (Hm[3:0]). When a lower nibble equals a
// higher one, its sum is the higher nibble's sum shifted right by 4 bits per
// nibble of distance, so its adder's result is not needed and a multiplexer
// takes the shifted sum instead:
//   AS2 = c1 ? AS1>>4 : A2
//   AS3 = c2 ? AS1>>8 : c4 ? AS2>>4 : A3
//   AS4 = c3 ? AS1>>12 : c5 ? AS2>>8 : c6 ? AS3>>4 : A4
// An adder whose result is not used gets zero operands (operand isolation),
// which is how "controlled addition" saves switching power here. The
// selection equations follow the document's description of controls C1..C6
// and the chained multiplexers; the priority order and the operand
// isolation are this design's choices. Because the partial products are
// truncated, a reused sum can differ from the direct sum by one LSB.
//
// Widths: AS1 17, AS2 13, AS3 9, AS4 5 bits. Purely combinational.
module vh_layer2
  import vh_pkg::*;
(
  input  pp_set_t          p,
  input  logic [6:1]       c,
  output logic [PPW-1:0]   as1,
  output logic [AS2W-1:0]  as2,
  output logic [AS3W-1:0]  as3,
  output logic [AS4W-1:0]  as4
);

  logic en2, en3, en4;                 // adder A2..A4 result needed
  logic [AS2W-1:0] a2;
  logic [AS3W-1:0] a3;
  logic [AS4W-1:0] a4;

  always_comb begin
    en2 = ~c[1];
    en3 = ~(c[2] | c[4]);
    en4 = ~(c[3] | c[5] | c[6]);

    // adder A1 always runs; A2..A4 only when no equal nibble above
    as1 = PPW'(p.p8) + PPW'(p.p7);
    a2  = (en2 ? AS2W'(p.p6) : '0) + (en2 ? AS2W'(p.p5) : '0);
    a3  = (en3 ? AS3W'(p.p4) : '0) + (en3 ? AS3W'(p.p3) : '0);
    a4  = (en4 ? AS4W'(p.p2) : '0) + (en4 ? AS4W'(p.p1) : '0);

    as2 = c[1] ? AS2W'(as1 >> 4) : a2;

    if (c[2])      as3 = AS3W'(as1 >> 8);
    else if (c[4]) as3 = AS3W'(as2 >> 4);
    else           as3 = a3;

    if (c[3])      as4 = AS4W'(as1 >> 12);
    else if (c[5]) as4 = AS4W'(as2 >> 8);
    else if (c[6]) as4 = AS4W'(as3 >> 4);
    else           as4 = a4;
  end

endmodule
