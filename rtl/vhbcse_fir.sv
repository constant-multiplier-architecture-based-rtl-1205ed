// vhbcse_fir: reconfigurable symmetric FIR filter on the VHBCSE multiplier.
//
// An NTAP-tap filter with symmetric coefficients, h[k] = h[NTAP-1-k], so only
// NCOEF = NTAP/2 distinct coefficients H0..H(NCOEF-1) are held. With the
// default NTAP = 8 this is the document's 8-tap symmetric filter whose four
// coefficients share one partial product generator.
//
//   coefficient LUT  NCOEF x 17-bit registers, written at any time through
//                    coef_we/coef_addr/coef_wdata (real-time reconfiguration)
//   input register   the sample is registered first (x_q)
//   MCM              vh_mcm multiplies x_q by all NCOEF coefficients
//   adder chain      transposed direct form: z[k] <= p[k] + z[k+1],
//                    y = p[0] + z[1], where p[k] is the product with h[k]
//
// The coefficient LUT, the input register and the MCM are the document's;
// the transposed direct form, the valid handshake, the reset values and the
// full-precision output width are this design's choices.
//
// Timing: a sample accepted with in_valid in cycle t is in x_q in cycle t+1,
// where it is multiplied (combinationally) and the chain advances; its
// output appears on y_out with out_valid in cycle t+2 (two-cycle latency,
// one sample per clock). The chain only advances on valid samples. A sample
// is multiplied by the coefficients in the LUT in the cycle it sits in x_q;
// a coefficient write becomes visible one cycle after coef_we.
//
// ctrl shows, per coefficient, which nibble and byte equalities the
// multiplier is exploiting; it changes with the LUT contents.
//
// Reset (rst_n low, synchronous): LUT, registers and outputs cleared.
module vhbcse_fir
  import vh_pkg::*;
#(
  parameter int unsigned NTAP  = 8,
  localparam int unsigned NCOEF = NTAP / 2,
  localparam int unsigned AW    = (NCOEF > 1) ? $clog2(NCOEF) : 1,
  localparam int unsigned ACCW  = YW + $clog2(NTAP)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // coefficient LUT write port
  input  logic                   coef_we,
  input  logic [AW-1:0]          coef_addr,
  input  coef_t                  coef_wdata,
  // sample stream
  input  logic                   in_valid,
  input  sample_t                x_in,
  output logic                   out_valid,
  output logic signed [ACCW-1:0] y_out,
  // control signals c[7:1] of each coefficient, for observation
  output ctrl_t                  ctrl   [NCOEF]
);

  coef_t    coef_q [NCOEF];
  sample_t  x_q;
  logic     v_q;
  product_t prod   [NCOEF];
  logic signed [ACCW-1:0] tap_p [NTAP];
  logic signed [ACCW-1:0] z     [1:NTAP-1];

  // coefficient LUT
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NCOEF; i++) coef_q[i] <= '0;
    end else if (coef_we) begin
      coef_q[coef_addr] <= coef_wdata;
    end
  end

  // input register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) x_q <= x_in;
    end
  end

  vh_mcm #(.NCOEF(NCOEF)) u_mcm (.x(x_q), .h(coef_q), .y(prod), .ctrl(ctrl));

  // product of tap k, sign-extended; symmetric taps share a multiplier
  always_comb begin
    for (int k = 0; k < NTAP; k++) begin
      tap_p[k] = ACCW'(signed'(prod[(k < NCOEF) ? k : NTAP - 1 - k]));
    end
  end

  // transposed-form adder and delay chain
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k < NTAP; k++) z[k] <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        for (int k = 1; k < NTAP - 1; k++) z[k] <= tap_p[k] + z[k+1];
        z[NTAP-1] <= tap_p[NTAP-1];
        y_out     <= tap_p[0] + z[1];
      end
    end
  end

  // a write must address an existing coefficient
  a_coef_addr : assert property (@(posedge clk) disable iff (!rst_n)
                                 coef_we |-> int'(coef_addr) < NCOEF)
    else $error("coefficient address %0d out of range", coef_addr);

endmodule
