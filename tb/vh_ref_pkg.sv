// vh_ref_pkg: reference arithmetic for the VHBCSE multiplier testbenches.
//
// Computes, with plain integer arithmetic, the value the multiplier is
// specified to produce. Each coefficient bit pair j (j = 0 for Hm[15:14])
// contributes its pattern's multiple of the sample magnitude, truncated to
// the 2*(8-j)+1 bits left after a right shift by 2j. Pairs are summed per
// nibble; a nibble equal to a higher one takes that nibble's sum shifted by
// 4 bits per nibble of distance instead (first match from the top wins, as
// does the lower byte when both bytes are equal). The full-precision product
// is available too, to bound the truncation error.
package vh_ref_pkg;

  // multiple of the sample magnitude for one 2-bit pattern
  function automatic int unsigned pat_val(input int unsigned pat, input int unsigned xm);
    case (pat)
      0:       return 0;
      1:       return xm / 2;
      2:       return xm;
      default: return xm + xm / 2;
    endcase
  endfunction

  // the eight truncated partial products, index j = 0 (top pair) .. 7
  function automatic int unsigned pair_pp(input int unsigned xm, input int unsigned hm, input int j);
    int unsigned pat;
    pat = (hm >> (14 - 2*j)) & 3;
    return pat_val(pat, xm) >> (2*j);
  endfunction

  // sum of one nibble n (0 = top) without reuse
  function automatic int unsigned nib_direct(input int unsigned xm, input int unsigned hm, input int n);
    return pair_pp(xm, hm, 2*n) + pair_pp(xm, hm, 2*n + 1);
  endfunction

  function automatic int unsigned nibble(input int unsigned hm, input int n);
    return (hm >> (12 - 4*n)) & 15;
  endfunction

  // product magnitude as the VHBCSE adder tree forms it
  function automatic int unsigned vh_mag(input int unsigned xm, input int unsigned hm);
    int unsigned as_n[4];
    int unsigned hi, lo, s;
    for (int n = 0; n < 4; n++) begin
      as_n[n] = nib_direct(xm, hm, n);
      for (int m = 0; m < n; m++) begin
        if (nibble(hm, m) == nibble(hm, n)) begin
          as_n[n] = as_n[m] >> (4*(n - m));
          break;
        end
      end
    end
    hi = as_n[0] + as_n[1];
    if ((hm >> 8) == (hm & 255)) lo = hi >> 8;
    else                         lo = as_n[2] + as_n[3];
    s = hi + lo;
    return (s >> 1) & 32'hFFFF;
  endfunction

  // product magnitude of the plain 2-bit BCSE tree: same truncated partial
  // products, all eight added, no reuse
  function automatic int unsigned bcse2_mag(input int unsigned xm, input int unsigned hm);
    int unsigned s = 0;
    for (int j = 0; j < 8; j++) s += pair_pp(xm, hm, j);
    return (s >> 1) & 32'hFFFF;
  endfunction

  // signed product X*H/2^16 as the multiplier forms it (16-bit result)
  function automatic logic [15:0] vh_mult(input logic [15:0] x, input logic [16:0] h);
    logic [14:0] xbits;
    logic [15:0] hbits, ym;
    logic neg;
    xbits = x[15] ? ~x[14:0] : x[14:0];
    hbits = h[16] ? ~h[15:0] : h[15:0];
    ym    = 16'(vh_mag(32'(xbits), 32'(hbits)));
    neg   = x[15] ^ h[16];
    return neg ? ~ym : ym;
  endfunction

  // floor(X*H/2^16), exact
  function automatic longint exact_mult(input logic [15:0] x, input logic [16:0] h);
    longint p;
    p = longint'(signed'(x)) * longint'(signed'(h));
    return p >>> 16;
  endfunction

endpackage
