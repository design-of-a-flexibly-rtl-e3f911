// fss_ref_pkg: reference model of how the FSS register file maps each
// thread's register index to a physical row, used by the testbenches to work
// out expected values without looking at the design's own decode.
//
// Rows 0..2**r-1 are the main rows, 2**r.. the stretched rows. Split point k
// sits below main row 2**(r-1) + k*2**(r-1)/ns. Thread 0 owns every main row
// below the lowest open split point; thread 1 owns every main row at or above
// the highest open split point (register i in row 2**r-1-i) and, when exactly
// one split point is open, the stretched rows after its main rows.
package fss_ref_pkg;

  function automatic int pos(int k, int r, int ns);
    return (1 << (r - 1)) + k * ((1 << (r - 1)) / ns);
  endfunction

  function automatic int n_open(logic [31:0] s, int ns);
    int n = 0;
    for (int k = 0; k < ns; k++) if (!s[k]) n++;
    return n;
  endfunction

  // first main row not reachable from the low end
  function automatic int lo_limit(logic [31:0] s, int r, int ns);
    for (int k = 0; k < ns; k++) if (!s[k]) return pos(k, r, ns);
    return 1 << r;
  endfunction

  // first main row reachable from the high end (0 when no split point is open)
  function automatic int hi_start(logic [31:0] s, int r, int ns);
    for (int k = ns - 1; k >= 0; k--) if (!s[k]) return pos(k, r, ns);
    return 0;
  endfunction

  function automatic int row_t0(logic [31:0] s, int r, int ns, int i);
    return (i < lo_limit(s, r, ns)) ? i : -1;
  endfunction

  function automatic int row_t1(logic [31:0] s, int r, int ns, int ex, int i);
    int nreg, rr, e;
    nreg = 1 << r;
    if (n_open(s, ns) == 0) return -1;
    rr = nreg - 1 - i;
    if (rr >= hi_start(s, r, ns)) return rr;
    if (n_open(s, ns) == 1) begin
      e = i - (nreg - hi_start(s, r, ns));
      if (e >= 0 && e < ex) return nreg + e;
    end
    return -1;
  endfunction

endpackage
