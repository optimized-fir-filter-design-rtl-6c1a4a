// mcmat_ref_pkg: reference arithmetic for the testbenches, written with plain
// integers and independent of the adder-cell netlists.
//
// tmult_ref(a, b) evaluates the truncated multiplier the same way the
// arithmetic is specified: partial products a*b[i]*2^i with the bits of rows
// 1..7 in columns 1..del_col removed, reduction by integer carry-save steps
// (s = x^y^z, c = maj(x,y,z) << 1) in the order 8 -> 6 -> 4 -> 3 -> 2 rows,
// a constant 2^8 (if const9) added in a last carry-save step, then the low
// 7 columns of both rows dropped, 1 added in column 8, and columns 9..16 kept.
package mcmat_ref_pkg;

  function automatic void csa(input int unsigned x, y, z,
                              output int unsigned s, c);
    s = (x ^ y ^ z) & 32'hFFFF;
    c = (((x & y) | (x & z) | (y & z)) << 1) & 32'hFFFF;
  endfunction

  function automatic int unsigned tmult_ref(int unsigned a, int unsigned b,
                                            int unsigned del_col = 6,
                                            bit const9 = 1'b1);
    int unsigned r[8];
    int unsigned s0, c0, s1, c1, t0, d0, t1, d1, u0, e0, v0, f0, rs, rc;
    for (int i = 0; i < 8; i++) begin
      r[i] = 0;
      if (b[i])
        for (int j = 0; j < 8; j++)
          if (a[j] && !(i >= 1 && i + j + 1 <= del_col))
            r[i] |= 1 << (i + j);
    end
    csa(r[0], r[1], r[2], s0, c0);
    csa(r[3], r[4], r[5], s1, c1);
    csa(s0, s1, c0, t0, d0);
    csa(c1, r[6], r[7], t1, d1);
    csa(t0, d0, t1, u0, e0);
    csa(u0, e0, d1, v0, f0);
    csa(v0, f0, const9 ? 32'h100 : 32'h0, rs, rc);
    return (((rs >> 7) + (rc >> 7) + 1) >> 1) % 256;
  endfunction

endpackage
