// ldpc_model_pkg: reference model used by the decoder testbenches.
//
// - h_row(): the parity check matrix row by row, expanded from the base
//   matrices (row m = 27*layer + r is connected to code bit
//   27*c + (r + s) mod 27 for every base entry s >= 0 in column c).
// - prepare()/encode(): a systematic encoder for any full or rank-deficient
//   H, by Gauss-Jordan elimination over GF(2): free bits are random, pivot
//   bits are solved from the reduced rows.
// - decode(): layered min-sum with the decoder's number formats, written
//   edge by edge with the check message of every edge stored in full and
//   each Rmn computed as the minimum over the other edges of the row, so it
//   shares no structure with the compressed hardware.
package ldpc_model_pkg;
  import ldpc_pkg::*;

  typedef logic [N-1:0] row_t;

  row_t rref [324];
  int   piv  [324];
  int   nrows;
  rate_e prepared_rate;
  bit    is_prepared = 0;

  function automatic row_t h_row(rate_e rate, int m);
    row_t v = '0;
    int l, r, s;
    l = m / int'(Z);
    r = m % int'(Z);
    for (int c = 0; c < int'(NB); c++) begin
      s = bm_entry(rate, l, c);
      if (s >= 0) v[c*int'(Z) + (r + s) % int'(Z)] = 1'b1;
    end
    return v;
  endfunction

  function automatic void prepare(rate_e rate);
    int m = num_layers(rate) * int'(Z);
    int col = 0;
    row_t rows [324];
    int r = 0;
    int p;
    row_t t;
    if (is_prepared && prepared_rate == rate) return;
    for (int i = 0; i < m; i++) rows[i] = h_row(rate, i);
    while (r < m && col < int'(N)) begin
      p = -1;
      for (int i = r; i < m; i++) if (rows[i][col]) begin p = i; break; end
      if (p >= 0) begin
        t = rows[p]; rows[p] = rows[r]; rows[r] = t;
        for (int i = 0; i < m; i++)
          if (i != r && rows[i][col]) rows[i] ^= rows[r];
        piv[r] = col;
        r++;
      end
      col++;
    end
    nrows = r;
    for (int i = 0; i < r; i++) rref[i] = rows[i];
    prepared_rate = rate;
    is_prepared   = 1;
  endfunction

  function automatic row_t encode(rate_e rate);
    row_t x, pmask;
    prepare(rate);
    pmask = '0;
    for (int i = 0; i < nrows; i++) pmask[piv[i]] = 1'b1;
    for (int n = 0; n < int'(N); n++) x[n] = pmask[n] ? 1'b0 : 1'($urandom);
    for (int i = 0; i < nrows; i++) x[piv[i]] = ^(rref[i] & x & ~pmask);
    return x;
  endfunction

  function automatic bit syndrome_ok(rate_e rate, row_t x);
    for (int m = 0; m < num_layers(rate) * int'(Z); m++)
      if (^(h_row(rate, m) & x)) return 0;
    return 1;
  endfunction

  // Count of Qnm values that the model had to saturate (coverage).
  int sat_count = 0;

  // Layered min-sum on q (in/out, one total value per code bit).
  function automatic void decode(rate_e rate, int iters, ref int q [N]);
    int rmsg [12][27][24];   // check message per layer, row, block column
    int qnm  [24];
    int cols [24];
    int nl, w, c, n, d, mag, a;
    bit neg;
    nl = num_layers(rate);
    if (iters < 1) iters = 1;
    foreach (rmsg[a, b, c]) rmsg[a][b][c] = 0;
    for (int it = 0; it < iters; it++)
      for (int l = 0; l < nl; l++)
        for (int r = 0; r < int'(Z); r++) begin
          w = 0;
          for (int cc = 0; cc < int'(NB); cc++)
            if (bm_entry(rate, l, cc) >= 0) cols[w++] = cc;
          for (int j = 0; j < w; j++) begin
            c = cols[j];
            n = c*int'(Z) + (r + bm_entry(rate, l, c)) % int'(Z);
            d = q[n] - rmsg[l][r][c];
            if (d > 31 || d < -31) sat_count++;
            qnm[j] = sat(d, 31);
          end
          for (int j = 0; j < w; j++) begin
            c = cols[j];
            n = c*int'(Z) + (r + bm_entry(rate, l, c)) % int'(Z);
            mag = 15;
            neg = 0;
            for (int o = 0; o < w; o++) if (o != j) begin
              a = (qnm[o] < 0) ? -qnm[o] : qnm[o];
              if (a > 15) a = 15;
              if (a < mag) mag = a;
              neg ^= (qnm[o] < 0);
            end
            rmsg[l][r][c] = neg ? -mag : mag;
            q[n] = sat(qnm[j] + rmsg[l][r][c], 31);
          end
        end
  endfunction

endpackage
