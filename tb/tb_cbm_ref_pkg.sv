// tb_cbm_ref_pkg: reference arithmetic for the configurable Booth multiplier
// testbenches, written with integer arithmetic rather than bit slicing.
//
// ref_digit(m, k)    radix-4 Booth digit k of a 9-bit signed multiplier m:
//                    -2*m[2k+1] + m[2k] + m[2k-1].
// ref_zero_digits(m) number of zero digits of m.
// ref_sub(mc, mp, tr) value of one byte-level sub-multiplier with multiplicand
//                    mc and multiplier mp (9-bit signed integers). Full
//                    precision is mc*mp. Truncated: each row (d*mc - neg)*4^k
//                    loses everything below 2^8, negation bits below 2^8 are
//                    dropped, and round(N/2)*2^8 is added, N being the number
//                    of non-zero digits among the four low rows.
// ref_cbm(cm, a, b)  the 32-bit result of the whole multiplier.
package tb_cbm_ref_pkg;

  function automatic int ref_bit(int v, int i);
    if (i < 0) return 0;
    if (i > 8) i = 8;
    return (v >>> i) & 1;
  endfunction

  function automatic int ref_digit(int m, int k);
    return -2 * ref_bit(m, 2*k+1) + ref_bit(m, 2*k) + ref_bit(m, 2*k-1);
  endfunction

  function automatic int ref_zero_digits(int m);
    int n = 0;
    for (int k = 0; k < 5; k++) if (ref_digit(m, k) == 0) n++;
    return n;
  endfunction

  function automatic int ref_sub(int mc, int mp, bit tr);
    int total, nzc, d, neg, rowv;
    if (!tr) return mc * mp;
    total = 0;
    nzc   = 0;
    for (int k = 0; k < 5; k++) begin
      d    = ref_digit(mp, k);
      neg  = (d < 0) ? 1 : 0;
      rowv = (d * mc - neg) * (1 << (2*k));
      total += (rowv >>> 8) * 256;          // floor to a multiple of 256
      if (2*k >= 8) total += neg * (1 << (2*k));
      if (k < 4 && d != 0) nzc++;
    end
    total += ((nzc + 1) / 2) * 256;
    return total;
  endfunction

  // Byte-level product as the multiplier computes it: the DRD extends bytes
  // (sa/sb: signed), and the operand with more zero digits is Booth-encoded.
  function automatic int ref_pair(int ab, int bb, bit sa, bit sb, bit tr);
    int x, y;
    x = (sa && ab >= 128) ? ab - 256 : ab;
    y = (sb && bb >= 128) ? bb - 256 : bb;
    if (ref_zero_digits(x) > ref_zero_digits(y)) return ref_sub(y, x, tr);
    return ref_sub(x, y, tr);
  endfunction

  function automatic longint sx16(int v);
    return v[15] ? longint'(v) - 64'sd65536 : longint'(v);
  endfunction

  function automatic logic [31:0] ref_cbm(logic [2:0] cm, logic [15:0] a, logic [15:0] b);
    int al, ah, bl, bh;
    bit trunc, sa, sbb;
    longint sa16, sb16;
    logic [31:0] r;
    int lh, hl, hh, ll;
    al = int'(a[7:0]); ah = int'(a[15:8]);
    bl = int'(b[7:0]); bh = int'(b[15:8]);
    trunc = ~cm[0];
    sa16 = sx16(int'(a));
    sb16 = sx16(int'(b));
    r = '0;
    if (cm[2:1] == 2'b11) begin
      if (a == 0 || b == 0) return '0;
      if (!trunc) return 32'(sa16 * sb16);
      sa  = (sa16 >= -128 && sa16 <= 127);
      sbb = (sb16 >= -128 && sb16 <= 127);
      hh = (sa || sbb) ? 0 : ref_pair(ah, bh, 1, 1, 0);
      lh = sbb ? 0 : ref_pair(al, bh, sa, 1, 1);
      hl = sa  ? 0 : ref_pair(ah, bl, 1, sbb, 1);
      r[31:16] = 16'(hh + (lh >>> 8) + (hl >>> 8));
      return r;
    end
    ll = ref_pair(al, bl, 1, 1, trunc);
    if (cm[2:1] == 2'b10) begin
      if (al == 0 || bl == 0) return '0;
      if (!trunc) return 32'(ll);
      r = 32'((ll >>> 8) * 256);
      return r;
    end
    hh = ref_pair(ah, bh, 1, 1, trunc);
    if (!(al == 0 || bl == 0)) r[15:0] = trunc ? {8'(ll >>> 8), 8'h00} : 16'(ll);
    if (!(ah == 0 || bh == 0)) r[31:16] = trunc ? {8'(hh >>> 8), 8'h00} : 16'(hh);
    return r;
  endfunction

endpackage
