// Reference model of the truncated, approximate-carry Booth product, written
// arithmetically for the testbenches: Booth digits are taken as
// d_i = -2*b[2i+1] + b[2i] + b[2i-1], each row is d_i*A (a negative row kept
// as the inverted magnitude plus a separate +1), the rows are cut below
// column Z, and the carry estimate (2*ones(col Z-1) + ones(col Z-2) + BIAS)/4
// is added at column Z. All arithmetic is on 64-bit integers.
package tacbm_ref_pkg;

  // Booth digit i of the n-bit two's-complement multiplier b.
  function automatic int booth_digit(longint b, int i);
    int bm1, b0, b1;
    bm1 = (i == 0) ? 0 : int'((b >> (2 * i - 1)) & 1);
    b0  = int'((b >> (2 * i)) & 1);
    b1  = int'((b >> (2 * i + 1)) & 1);
    return -2 * b1 + b0 + bm1;
  endfunction

  // Approximate product as a 2n-bit pattern (upper bits of the result zero).
  function automatic longint ref_product(longint a, longint b, int n, int z, int bias);
    longint rowbits, rowval, acc, m17;
    int d, neg;
    m17 = (64'sd1 <<< (n + 1)) - 1;
    acc = 0;
    for (int i = 0; i < n / 2; i++) begin
      d   = booth_digit(b, i);
      neg = (d < 0) ? 1 : 0;
      rowbits = (d >= 0) ? ((longint'(d) * a) & m17) : (~((-longint'(d)) * a) & m17);
      // sign-extend the (n+1)-bit row
      rowval = (((rowbits >> n) & 1) != 0) ? (rowbits - (m17 + 1)) : rowbits;
      acc = acc + (((rowval <<< (2 * i)) >>> z) <<< z);
      if (2 * i >= z) acc = acc + (longint'(neg) <<< (2 * i));
    end
    acc = acc + (ref_carry(a, b, n, z, bias) <<< z);
    return acc & ((64'sd1 <<< (2 * n)) - 1);
  endfunction

  // The estimated carry alone: weighted count of the bits in columns z-1, z-2.
  function automatic longint ref_carry(longint a, longint b, int n, int z, int bias);
    longint rowbits, m17;
    int d, neg, hi, lo;
    m17 = (64'sd1 <<< (n + 1)) - 1;
    hi  = 0;
    lo  = 0;
    for (int i = 0; i < n / 2; i++) begin
      d   = booth_digit(b, i);
      neg = (d < 0) ? 1 : 0;
      rowbits = (d >= 0) ? ((longint'(d) * a) & m17) : (~((-longint'(d)) * a) & m17);
      if (2 * i <= z - 1) hi += int'((rowbits >> (z - 1 - 2 * i)) & 1);
      if (2 * i <= z - 2) lo += int'((rowbits >> (z - 2 - 2 * i)) & 1);
      if (2 * i == z - 1) hi += neg;
      if (2 * i == z - 2) lo += neg;
    end
    return (longint'(2 * hi) + longint'(lo) + longint'(bias)) / 4;
  endfunction

  // Sign-extend a 2n-bit pattern.
  function automatic longint sext(longint v, int w);
    return (((v >> (w - 1)) & 1) != 0) ? (v - (64'sd1 <<< w)) : v;
  endfunction

endpackage
