// booth_ref_pkg: reference arithmetic for the fixed-width Booth multiplier
// testbenches, written from the definitions rather than from the RTL.
//
// trunc_part() returns the value of the partial-product bits that a
// fixed-width L x L multiplier with W kept lower columns drops (columns
// 0 .. L-W-1), and nz_low() the number of nonzero Booth digits among the rows
// that reach those columns. comp_from_stats() turns exhaustive sums into the
// expected carry into column L-W.
package booth_ref_pkg;
  function automatic int booth_digit(longint b, int i);
    int b2, b1, b0;
    b2 = int'((b >> (2 * i + 1)) & 1);
    b1 = int'((b >> (2 * i)) & 1);
    b0 = (i == 0) ? 0 : int'((b >> (2 * i - 1)) & 1);
    return -2 * b2 + b1 + b0;
  endfunction

  function automatic longint trunc_part(int l, int w, longint a, longint b);
    longint tp, mag, bits, mask_m;
    int y, m;
    tp = 0;
    for (int i = 0; 2 * i < l - w; i++) begin
      y = booth_digit(b, i);
      if (y == 0) continue;
      m = l - w - 2 * i;
      mag = longint'(y < 0 ? -y : y) * a;     // |y| * A, exact
      bits = mag & ((longint'(1) << (l + 1)) - 1);  // its (L+1)-bit code
      if (y < 0) bits = ~bits;
      mask_m = (longint'(1) << m) - 1;
      tp += (bits & mask_m) << (2 * i);
      if (y < 0) tp += longint'(1) << (2 * i);
    end
    return tp;
  endfunction

  function automatic int nz_low(int l, int w, longint b);
    int n;
    n = 0;
    for (int i = 0; 2 * i < l - w; i++) if (booth_digit(b, i) != 0) n++;
    return n;
  endfunction

  // floor((sum_tp/cnt + 2^(L-1)) / 2^(L-W))
  function automatic longint comp_from_stats(int l, int w, longint sum_tp, longint cnt);
    if (cnt == 0) return 0;
    return (sum_tp + cnt * (longint'(1) << (l - 1))) / (cnt * (longint'(1) << (l - w)));
  endfunction
endpackage
