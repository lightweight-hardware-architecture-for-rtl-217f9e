// pgdbf_ref_pkg: bit-accurate software model of PGDBF decoding used by the
// testbenches as the expected result.
//
// The model works in code order, the way the algorithm is written: checks
// c(a,b) = XOR of v(i, (b + h(a,i)) % Z); energy E(i,j) = (v xor y) + the DV
// checks c(a, (j - h + Z) % Z); maximum energy over all VNs (precise) or over
// the VNs whose random bit is 1 (imprecise); flip VNs with E == max and random
// bit 1. The random bit of VN j of base column i in iteration k is the VNU
// type of the position where the shifting architecture holds that VN,
// is_type1(i, (j + k*L) % Z). It stops when all checks are satisfied or after
// ITMAX flipping iterations. It also counts events for the coverage checks.
package pgdbf_ref_pkg;
  import pgdbf_pkg::*;

  typedef struct {
    int iters;
    bit success;
    int imprecise_max;   // iterations where the searched maximum < true max
    int flips;           // VN flips
    int held;            // VNs at the searched max not flipped (random bit 0)
  } ref_stats_t;

  function automatic void ref_decode(
      input int z, input int nr, input int nc, input int dv, input int itmax,
      input int l, input int p0_pct, input bit imprecise,
      input bit y[], output bit x[], output ref_stats_t st);
    bit c[];
    int e[];
    bit r[];
    int emax, etrue, rot;
    x = new[nc * z];
    c = new[nr * z];
    e = new[nc * z];
    r = new[nc * z];
    foreach (y[n]) x[n] = y[n];
    st = '{default: 0};
    for (int k = 0; ; k++) begin
      bit any;
      any = 0;
      foreach (c[n]) c[n] = 0;
      for (int a = 0; a < nr; a++)
        for (int i = 0; i < nc; i++) begin
          int h;
          h = hb_shift(a, i, z, nr, dv);
          if (h >= 0)
            for (int b = 0; b < z; b++) c[a*z + b] ^= x[i*z + (b + h) % z];
        end
      foreach (c[n]) any |= c[n];
      if (!any) begin
        st.iters = k;
        st.success = 1;
        return;
      end
      if (k == itmax) begin
        st.iters = k;
        st.success = 0;
        return;
      end
      rot = (k * l) % z;
      emax = 0;
      etrue = 0;
      for (int i = 0; i < nc; i++)
        for (int j = 0; j < z; j++) begin
          int n;
          n = i * z + j;
          e[n] = int'(x[n] ^ y[n]);
          for (int t = 0; t < dv; t++) begin
            int a, h;
            a = col_row(i, t, nr, dv);
            h = hb_shift(a, i, z, nr, dv);
            e[n] += int'(c[a*z + (j - h + z) % z]);
          end
          r[n] = is_type1(i, (j + rot) % z, z, p0_pct);
          if (e[n] > etrue) etrue = e[n];
          if ((!imprecise || r[n]) && e[n] > emax) emax = e[n];
        end
      if (emax < etrue) st.imprecise_max++;
      foreach (x[n])
        if (e[n] == emax) begin
          if (r[n]) begin
            x[n] = !x[n];
            st.flips++;
          end else begin
            st.held++;
          end
        end
    end
  endfunction
endpackage
