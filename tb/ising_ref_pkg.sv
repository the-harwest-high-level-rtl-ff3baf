// ising_ref_pkg: software reference of the Heat-Bath engine for the testbenches.
//
// The lattice is an array of site_t indexed (i*L + j)*L + k. ref_sweep runs
// one lattice sweep the way the kernel states it, site by site, with the
// sites ordered by parity (all sites with (i+j+k) even, then all odd) and,
// inside a parity class, by k; the random number for site (i, j, k) is
// drawn from generator number i*(L/2) + j/2, one draw per site in that order.
// Integer arithmetic on +1/-1 values is used throughout, not the bit tricks
// of the hardware.
package ising_ref_pkg;
  import ising_pkg::*;

  function automatic int unsigned ref_xorshift(input int unsigned x);
    longint unsigned v;
    v = x;
    v = (v ^ (v << 13)) & 64'hFFFF_FFFF;
    v = (v ^ (v >> 17)) & 64'hFFFF_FFFF;
    v = (v ^ (v << 5))  & 64'hFFFF_FFFF;
    return int'(v);
  endfunction

  function automatic int unsigned ref_seed(input int unsigned base, input int unsigned idx);
    longint unsigned s;
    s = (longint'(idx + 1) * 64'h9E37_79B9) & 64'hFFFF_FFFF;
    s = s ^ base;
    return (s == 0) ? 1 : int'(s);
  endfunction

  function automatic int pm(input logic b);
    return b ? 1 : -1;
  endfunction

  function automatic int idx3(input int L, input int i, input int j, input int k);
    return (((i % L + L) % L) * L + ((j % L + L) % L)) * L + ((k % L + L) % L);
  endfunction

  // Neighbour sum of the kernel: spin[nb]*J[nb] over the six neighbours.
  function automatic int ref_nbs(input int L, ref site_t lat[], input int i, input int j,
                                 input int k);
    site_t s;
    int    sum = 0;
    s = lat[idx3(L, i+1, j, k)]; sum += pm(s.spin) * pm(s.jx);
    s = lat[idx3(L, i-1, j, k)]; sum += pm(s.spin) * pm(s.jx);
    s = lat[idx3(L, i, j+1, k)]; sum += pm(s.spin) * pm(s.jy);
    s = lat[idx3(L, i, j-1, k)]; sum += pm(s.spin) * pm(s.jy);
    s = lat[idx3(L, i, j, k+1)]; sum += pm(s.spin) * pm(s.jz);
    s = lat[idx3(L, i, j, k-1)]; sum += pm(s.spin) * pm(s.jz);
    return sum;
  endfunction

  // One sweep. nbs_hist[(nbs+6)/2] counts the visited energy levels,
  // set_up/set_down count the two outcomes.
  function automatic void ref_sweep(input int L, ref site_t lat[], ref int unsigned rng[],
                                    input int unsigned hbt[7], ref int nbs_hist[7],
                                    ref int set_up, ref int set_down);
    int H = L / 2;
    for (int p = 0; p < 2; p++)
      for (int k = 0; k < L; k++)
        for (int i = 0; i < L; i++)
          for (int j = 0; j < L; j++) begin
            if (((i + j + k) % 2) == p) begin
              int          nbs, fu;
              int unsigned r;
              nbs = ref_nbs(L, lat, i, j, k);
              fu  = i * H + j / 2;
              r   = rng[fu];
              rng[fu] = ref_xorshift(rng[fu]);
              nbs_hist[(nbs + 6) / 2]++;
              if (r < hbt[(nbs + 6) / 2]) begin
                lat[idx3(L, i, j, k)].spin = 1'b1;
                set_up++;
              end else begin
                lat[idx3(L, i, j, k)].spin = 1'b0;
                set_down++;
              end
            end
          end
  endfunction

  // Heat-bath threshold for inverse temperature beta: the probability of
  // spin +1 given nbs is 1/(1+exp(-2*beta*nbs)), scaled to 2^32.
  function automatic int unsigned ref_hbt(input real beta, input int nbs);
    real p, t;
    p = 1.0 / (1.0 + $exp(-2.0 * beta * real'(nbs)));
    t = p * 4294967296.0;
    if (t >= 4294967295.0) return 32'hFFFF_FFFF;
    return int'(longint'(t));
  endfunction

endpackage
