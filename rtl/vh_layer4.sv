// vh_layer4: final addition at layer 4.
//
// Adds the two byte sums, S = AS5 + AS6 (adder A7, 17 bits), which is the
// product magnitude in units of half a sample LSB: a coefficient pair
// pattern "10" in the top pair stands for X*2^-1 but selects X. The
// magnitude of X*Hm/2^16 is therefore S>>1, 16 bits. The adder follows the
// document; dropping the last bit to scale the 16-bit result is this
// design's reading of the number format. Purely combinational.
module vh_layer4
  import vh_pkg::*;
(
  input  logic [PPW-1:0]  as5,
  input  logic [AS6W-1:0] as6,
  output logic [YW-1:0]   ym
);

  logic [PPW-1:0] s;

  always_comb begin
    s  = as5 + PPW'(as6);   // adder A7
    ym = YW'(s >> 1);   // s[0] is below the product's LSB
  end

endmodule
