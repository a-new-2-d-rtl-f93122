// iir2d_ref_pkg: reference model for the filter testbenches.
//
// It evaluates the 2-D difference equation directly on a raster stream,
// without any of the hardware's reordering, z^-P registers or shift
// registers:
//   y[t] = sat( wrap( sum_{i,j} q(a(i,j) x[t-iM-j]) + sum_{(i,j)!=(0,0)} q(b(i,j) y[t-iM-j]) ) )
// where q(v) = v >>> cf (truncation), wrap keeps aw bits two's complement,
// sat clips to dw bits and samples before t = 0 are zero. Coefficients are
// passed flattened, index i*(n+1)+j. cascade() chains second-order sections.
package iir2d_ref_pkg;

  function automatic longint wrap(input longint v, input int bits);
    longint m;
    m = v & ((longint'(1) << bits) - 1);
    if (m >= (longint'(1) << (bits - 1))) m -= (longint'(1) << bits);
    return m;
  endfunction

  function automatic longint sat(input longint v, input int bits);
    longint hi, lo;
    hi = (longint'(1) << (bits - 1)) - 1;
    lo = -(longint'(1) << (bits - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  function automatic longint q(input longint c, input longint d, input int cf);
    return (c * d) >>> cf;
  endfunction

  // Filters x (length len) into y. nsat counts outputs that saturated.
  function automatic void filter(input int n, input int m, input int cf,
                                 input int aw, input int dw,
                                 input int a[], input int b[],
                                 input int x[], ref int y[], ref int nsat);
    longint acc, w;
    int idx;
    y = new[x.size()];
    for (int t = 0; t < x.size(); t++) begin
      acc = 0;
      for (int i = 0; i <= n; i++) begin
        for (int j = 0; j <= n; j++) begin
          idx = t - i * m - j;
          if (idx >= 0) begin
            acc += q(a[i*(n+1)+j], x[idx], cf);
            if (i != 0 || j != 0) acc += q(b[i*(n+1)+j], y[idx], cf);
          end
        end
      end
      w = wrap(acc, aw);
      y[t] = int'(sat(w, dw));
      if (longint'(y[t]) != w) nsat++;
    end
  endfunction

  // Cascade of ns second-order sections (coefficients of section l at
  // ca[l*9 .. l*9+8], index i*3+j) with a one-sample register between
  // sections. v[t] is the last section's output for input sample t; the
  // hardware presents it one clock later, after its output register.
  function automatic void cascade(input int ns, input int m, input int cf,
                                  input int aw, input int dw,
                                  input int ca[], input int cb[],
                                  input int x[], ref int v[], ref int nsat);
    int u[], sa[], sb[];
    u = x;
    sa = new[9]; sb = new[9];
    for (int l = 0; l < ns; l++) begin
      for (int k = 0; k < 9; k++) begin
        sa[k] = ca[l*9+k];
        sb[k] = cb[l*9+k];
      end
      filter(2, m, cf, aw, dw, sa, sb, u, v, nsat);
      if (l < ns - 1) begin
        u = new[x.size()];
        u[0] = 0;
        for (int t = 1; t < x.size(); t++) u[t] = v[t-1];
      end
    end
  endfunction

endpackage
