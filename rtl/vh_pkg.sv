// vh_pkg: shared widths and types of the VHBCSE (vertical-horizontal binary
// common sub-expression elimination) constant multiplier.
//
// Number format. The sample X is a 16-bit two's complement integer. The
// coefficient H is a 17-bit two's complement fraction: H/2^16, so its sign
// bit is H[16] and its 16 magnitude bits weigh 2^-1 (H[15]) down to 2^-16
// (H[0]). The product Y = X*H/2^16 is a 16-bit two's complement integer.
// These widths (16-bit input, 17-bit coefficient, 16-bit output) follow the
// document; the fractional reading of H is this design's own.
//
// Inside the multiplier all arithmetic is on unsigned magnitudes in units of
// the sample LSB. The 2-bit pattern of each coefficient bit pair selects one of
// four partial products from the partial product generator (PPG):
//   "00" -> 0, "01" -> X>>1, "10" -> X, "11" -> X + (X>>1)
package vh_pkg;

  localparam int unsigned XW   = 16;  // sample width (two's complement)
  localparam int unsigned HW   = 17;  // coefficient width (sign + 16 magnitude bits)
  localparam int unsigned HMW  = 16;  // coefficient magnitude width
  localparam int unsigned YW   = 16;  // product width (two's complement)
  localparam int unsigned PPW  = 17;  // widest partial product (P8)
  localparam int unsigned AS2W = 13;  // layer-2 sum of Hm[11:8]
  localparam int unsigned AS3W = 9;   // layer-2 sum of Hm[7:4]
  localparam int unsigned AS4W = 5;   // layer-2 sum of Hm[3:0]
  localparam int unsigned AS6W = 9;   // layer-3 sum of Hm[7:0]

  typedef logic [XW-1:0]  sample_t;
  typedef logic [HW-1:0]  coef_t;
  typedef logic [HMW-1:0] coef_mag_t;
  typedef logic [YW-1:0]  product_t;
  typedef logic [PPW-1:0] pp_t;

  // The three non-zero partial products the PPG shares between all
  // coefficient branches (layer-1 vertical 2-bit BCSE).
  typedef struct packed {
    pp_t x1;    // pattern "11": X + X/2, made by adder A0
    pp_t xf;    // pattern "10": X
    pp_t xh;    // pattern "01": X/2
  } ppg_t;

  // The eight layer-1 partial products P8..P1, one per coefficient bit pair
  // (P8 from Hm[15:14] ... P1 from Hm[1:0]). Pk is the selected PPG output
  // shifted right by 2*(8-k) bits, so it is only 2k+1 bits wide.
  typedef struct packed {
    logic [16:0] p8;
    logic [14:0] p7;
    logic [12:0] p6;
    logic [10:0] p5;
    logic [8:0]  p4;
    logic [6:0]  p3;
    logic [4:0]  p2;
    logic [2:0]  p1;
  } pp_set_t;

  // Control signals of the control logic generator. c[1..6] are the six
  // 4-bit (nibble) equalities, c[7] the 8-bit (byte) equality.
  typedef logic [7:1] ctrl_t;

  // 2-bit BCS pattern codes
  typedef enum logic [1:0] {
    BCS_00 = 2'b00,
    BCS_01 = 2'b01,
    BCS_10 = 2'b10,
    BCS_11 = 2'b11
  } bcs_e;

endpackage
