// vh_mux_unit: layer-1 multiplexer unit.
//
// Eight 4:1 multiplexers, one per coefficient bit pair, pick the partial
// product of that pair's 2-bit pattern from the PPG outputs. Multiplexer k
// (k = 8 for Hm[15:14] down to k = 1 for Hm[1:0]) works on the PPG outputs
// shifted right by 2*(8-k) bits, so it is only 2k+1 bits wide:
// 17, 15, 13, 11, 9, 7, 5 and 3 bits for P8..P1, as in the document. The
// bits shifted out are dropped (truncation).
//
// Interface: hm (coefficient magnitude), pp (PPG outputs) in; the eight
// partial products out as a pp_set_t. Purely combinational.
module vh_mux_unit
  import vh_pkg::*;
(
  input  coef_mag_t hm,
  input  ppg_t      pp,
  output pp_set_t   p
);

  // 4:1 selection on the full 17-bit PPG outputs; the shift is wiring
  function automatic pp_t sel4(input logic [1:0] pat, input ppg_t v, input int unsigned sh);
    unique case (bcs_e'(pat))
      BCS_00:  return '0;
      BCS_01:  return v.xh >> sh;
      BCS_10:  return v.xf >> sh;
      default: return v.x1 >> sh;
    endcase
  endfunction

  always_comb begin
    p.p8 = 17'(sel4(hm[15:14], pp, 0));
    p.p7 = 15'(sel4(hm[13:12], pp, 2));
    p.p6 = 13'(sel4(hm[11:10], pp, 4));
    p.p5 = 11'(sel4(hm[9:8],   pp, 6));
    p.p4 = 9'(sel4(hm[7:6],    pp, 8));
    p.p3 = 7'(sel4(hm[5:4],    pp, 10));
    p.p2 = 5'(sel4(hm[3:2],    pp, 12));
    p.p1 = 3'(sel4(hm[1:0],    pp, 14));
  end

endmodule
