// vh_sign_conv: sign conversion block.
//
// Splits a W-bit two's complement word into its sign (the MSB) and a W-1 bit
// magnitude. The magnitude is the lower W-1 bits passed through a 2:1
// multiplexer that picks either the bits as they are (sign 0) or their 1's
// complement (sign 1). For a negative word this gives |value| - 1, so a
// small negative coefficient becomes a word with few ones, which keeps the
// later adder tree small and quiet. The 1's complement plus multiplexer on
// the coefficient (W = 17, 16-bit magnitude) follows the document; using the
// same block on the 16-bit sample is this design's reading of the document's
// remark that both the input and the coefficient are signed.
//
// Interface: din (W bits) in, sign and mag out. Purely combinational.
module vh_sign_conv #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] din,
  output logic         sign,
  output logic [W-2:0] mag
);

  logic [W-2:0] inverted;

  always_comb begin
    sign     = din[W-1];
    inverted = ~din[W-2:0];                    // 1's complement circuit
    mag      = sign ? inverted : din[W-2:0];   // (W-1)-bit 2:1 multiplexer
  end

endmodule
