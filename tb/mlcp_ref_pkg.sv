// mlcp_ref_pkg: arithmetic reference model of the fixed-width MLCP Booth
// multiplier, for the testbenches. It works on integers (digit times X,
// whole-product differences) rather than on the bit matrix the RTL builds,
// so it checks the RTL's column bookkeeping independently. Valid for L <= 30.
package mlcp_ref_pkg;

  typedef struct {
    longint p;       // exact product
    longint mp_hi;   // main part MP / 2^L, modulo 2^L
    longint s_mj;    // major truncation part in units of 2^(L-w)
    int     k;       // nonzero digits among the rows reaching the minor part
    longint sigma;   // compensation
    longint pq;      // fixed-width product, L bits
    longint z;       // nonzero codes, bit j = digit j
    int     nneg;    // negative digits
  } ref_t;

  function automatic longint ext(input longint v, input int l, input bit sgn);
    longint m;
    m = v & ((64'sd1 <<< l) - 1);
    if (sgn && m[l-1]) m = m - (64'sd1 <<< l);
    return m;
  endfunction

  function automatic ref_t mlcp_ref(input int l, input int w, input bit sgn,
                                    input longint x, input longint y);
    ref_t   r;
    longint xv, yv, tp, row, low, mask_l;
    int     rows, d, b2, b1, b0;
    xv   = ext(x, l, sgn);
    yv   = ext(y, l, sgn);
    rows = sgn ? l / 2 : l / 2 + 1;
    mask_l = (64'sd1 <<< l) - 1;
    r.p = xv * yv;
    tp = 0; r.s_mj = 0; r.k = 0; r.z = 0; r.nneg = 0;
    for (int j = 0; j < rows; j++) begin
      b2 = int'((yv >>> (2*j+1)) & 1);
      b1 = int'((yv >>> (2*j)) & 1);
      b0 = (j == 0) ? 0 : int'((yv >>> (2*j-1)) & 1);
      d  = -2*b2 + b1 + b0;
      row = (d >= 0) ? longint'(d) * xv : ~((-longint'(d)) * xv);
      if (d != 0) r.z |= (64'sd1 << j);
      if (d < 0) r.nneg++;
      if (2*j < l) begin
        low = (row & ((64'sd1 <<< (l - 2*j)) - 1)) <<< (2*j);
        if (d < 0) low = low + (64'sd1 <<< (2*j));
        tp = tp + low;
        r.s_mj += (((row & ((64'sd1 <<< (l - 2*j)) - 1)) <<< (2*j)) >>> (l - w));
        if (d < 0 && 2*j >= l - w) r.s_mj += 64'sd1 <<< (2*j - (l - w));
        if (d != 0 && 2*j <= l - w - 1) r.k++;
      end
    end
    r.mp_hi = ((r.p - tp) >>> l) & mask_l;
    r.sigma = (2*r.s_mj + longint'(r.k) + (64'sd1 <<< w)) >>> (w + 1);
    r.pq    = (r.mp_hi + r.sigma) & mask_l;
    return r;
  endfunction

endpackage
