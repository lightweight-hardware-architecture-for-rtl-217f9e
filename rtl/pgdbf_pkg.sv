// pgdbf_pkg: constants and constant functions shared by the VNSA-based
// PGDBF decoder.
//
// The decoder works on a regular quasi-cyclic LDPC code: an NR x NC base
// matrix whose entries are either -1 (all-zero Z x Z block) or a circulant
// shift 0..Z-1. The default code has the size of the dv3R050N1296 test code
// (dv=3, dc=6, Z=54, M=648, N=1296, rate 1/2). Its base matrix entries are
// not published, so this package computes a base matrix of that shape:
//   - base column i is connected to base rows a with a % (NR/DV) == i % (NR/DV)
//     (this gives every column DV rows and every row NC*DV/NR = dc columns);
//   - the shift of a connected entry is (a * i * (a + 7)) % Z (0-based a, i),
//     which for Z = 54 has no 4-cycles.
// It also computes which VNU positions get a flipping (type-1) VNU and which a
// non-flipping (type-2 or type-3) VNU: position p of base column i is type-1
// when (p * STRIDE + 29 * i) % Z < ONES, with STRIDE the first integer >= 17
// coprime to Z and ONES = round(p0 * Z). Every base column therefore has
// exactly ONES type-1 VNUs, in a scrambled order that differs per column.
package pgdbf_pkg;

  // Energy width: the energy of a VN is (v xor y) + sum of DV check bits,
  // i.e. 0 .. DV+1.
  function automatic int energy_width(input int dv);
    return $clog2(dv + 2);
  endfunction

  // Circulant shift of base entry (a, i), or -1 for an all-zero block.
  function automatic int hb_shift(input int a, input int i, input int z,
                                  input int nr, input int dv);
    int s;
    s = nr / dv;
    if ((a % s) != (i % s)) return -1;
    return (a * i * (a + 7)) % z;
  endfunction

  // Base row of the t-th (0..DV-1) neighbour of base column i.
  function automatic int col_row(input int i, input int t, input int nr,
                                 input int dv);
    return (i % (nr / dv)) + t * (nr / dv);
  endfunction

  // Number of type-1 (flipping) VNUs per base column: round(p0 * Z).
  function automatic int type1_per_col(input int z, input int p0_pct);
    return (p0_pct * z + 50) / 100;
  endfunction

  function automatic int gcd(input int a, input int b);
    int x, y, t;
    x = a;
    y = b;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  function automatic int type_stride(input int z);
    int s;
    s = 17;
    while (gcd(s, z) != 1) s++;
    return s;
  endfunction

  // 1 when the VNU at position p of base column i is a type-1 VNU.
  function automatic bit is_type1(input int i, input int p, input int z,
                                  input int p0_pct);
    return ((p * type_stride(z) + 29 * i) % z) < type1_per_col(z, p0_pct);
  endfunction

  // Number of type-1 VNUs that come before flat position (i*Z + p): the
  // input index of that VNU's energy at the compacted maximum finder of the
  // imprecise decoder.
  function automatic int type1_rank(input int i, input int p, input int z,
                                    input int p0_pct);
    int r;
    r = i * type1_per_col(z, p0_pct);  // every column holds exactly that many
    for (int pp = 0; pp < p; pp++)
      if (is_type1(i, pp, z, p0_pct)) r++;
    return r;
  endfunction

endpackage
