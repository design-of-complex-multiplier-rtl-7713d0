// vedic_ref_pkg: reference arithmetic and timing used by the testbenches.
// The functions restate, in plain integer arithmetic, what each block
// must produce: the leading-one index, the nearest power-of-two radix
// (ties and below the mean go to the lower radix) and the cycle counts
// promised in the module headers. Counts are in clock edges, the edge that
// samples start being edge 1.
package vedic_ref_pkg;
  function automatic int msb_index(longint unsigned v);
    int r = -1;
    for (int i = 0; i < 64; i++) if (v[i]) r = i;
    return r;
  endfunction

  // Radix nearest v: 2^(p+1) when v > 1.5*2^p, else 2^p; 0 for v == 0.
  function automatic longint unsigned radix_of(longint unsigned v);
    int p = msb_index(v);
    if (v == 0) return 0;
    if (2 * v > 3 * (64'd1 << p)) return 64'd1 << (p + 1);
    return 64'd1 << p;
  endfunction

  function automatic int ed_latency(longint unsigned v, int width);
    if (v == 0) return 1;
    return width - msb_index(v) + 1;
  endfunction

  function automatic int rsu_latency(longint unsigned v, int width);
    return ed_latency(v, width) + 1;
  endfunction

  function automatic int nik_latency(longint unsigned x, longint unsigned y, int n);
    int r = (rsu_latency(x, n) > rsu_latency(y, n)) ? rsu_latency(x, n) : rsu_latency(y, n);
    int ex, ey;
    if (x == 0 || y == 0) return r + 1;
    ex = ed_latency(radix_of(x), n + 1);
    ey = ed_latency(radix_of(y), n + 1);
    return r + ((ex > ey) ? ex : ey) + 2;
  endfunction
endpackage
