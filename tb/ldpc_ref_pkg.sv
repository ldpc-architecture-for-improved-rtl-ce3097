// ldpc_ref_pkg: behavioural reference model of the Split-Row threshold
// min-sum decoder, used by the testbenches to work out expected values.
//
// It is written over plain integers and dynamic arrays, edge by edge, with
// no sharing of code with the RTL. The parity-check matrix is passed as a
// flat array h[m*n_cols + n]. Numbers follow the same fixed-point rules as
// the hardware: messages saturate to +-(2**(W-1)-1), check messages are
// floor(magnitude * s_num / 2**s_shift) with the sign applied afterwards,
// and the schedule is flooding (all rows with the previous iteration's
// posteriors, then all posteriors at once).
package ldpc_ref_pkg;

  function automatic int sat(int v, int w);
    int lim = (1 << (w - 1)) - 1;
    if (v > lim) return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

  // One partition's check node: inputs are the messages of its columns and
  // which of them take part. Magnitudes are limited to 2**(w-1)-1.
  function automatic void chnu(input int beta[], input bit mask[], input int t,
                               input bit sign_in, input bit thr_in,
                               input int s_num, input int s_shift, input int w,
                               output int alpha[], output bit sign_out,
                               output bit thr_out);
    int lim = (1 << (w - 1)) - 1;
    int mags[];
    int mn1, mn2, i1, a, b;
    bit rs;
    mags = new[beta.size()];
    alpha = new[beta.size()];
    sign_out = 0;
    mn1 = lim; mn2 = lim; i1 = -1;
    foreach (beta[i]) begin
      mags[i] = lim;
      if (mask[i]) begin
        mags[i] = (beta[i] < 0) ? -beta[i] : beta[i];
        if (mags[i] > lim) mags[i] = lim;
        if (beta[i] < 0) sign_out = !sign_out;
      end
    end
    // First and second minimum over the columns that take part.
    foreach (mags[i]) if (mask[i]) begin
      if (i1 < 0 || mags[i] < mn1) begin
        mn2 = mn1; mn1 = mags[i]; i1 = i;
      end else if (mags[i] < mn2) mn2 = mags[i];
    end
    thr_out = (mn1 < t);
    a = mn1; b = mn2;
    if (thr_out && thr_in && mn2 >= t) b = t;
    if (!thr_out && thr_in) begin a = t; b = t; end
    rs = sign_out ^ sign_in;
    foreach (beta[i]) begin
      int mg;
      if (!mask[i]) begin alpha[i] = 0; continue; end
      mg = (i == i1) ? b : a;
      mg = (mg * s_num) >> s_shift;
      alpha[i] = (rs ^ (beta[i] < 0)) ? -mg : mg;
    end
  endfunction

  // Syndrome weight of hard decisions r.
  function automatic int syndrome_weight(input bit h[], input int m_rows,
                                         input int n_cols, input bit r[]);
    int wgt = 0;
    for (int m = 0; m < m_rows; m++) begin
      bit s = 0;
      for (int n = 0; n < n_cols; n++) if (h[m*n_cols+n]) s ^= r[n];
      wgt += s;
    end
    return wgt;
  endfunction

  // Whole decoder. Returns the number of iterations used; dec and ok give
  // the final hard decisions and whether all checks hold.
  function automatic int decode(input bit h[], input int m_rows, input int n_cols,
                                input int split, input int llr[], input int t,
                                input int s_num, input int s_shift, input int w,
                                input int max_iter, output bit dec[], output bit ok);
    int np = n_cols / split;
    int post[], acc[], alpha[];
    int it;
    post = new[n_cols];
    acc = new[n_cols];
    alpha = new[m_rows * n_cols];
    dec = new[n_cols];
    foreach (alpha[i]) alpha[i] = 0;
    foreach (post[n]) post[n] = llr[n];
    for (it = 0; it < max_iter; it++) begin
      foreach (acc[n]) acc[n] = llr[n];
      for (int m = 0; m < m_rows; m++) begin
        bit sg[], te[];
        int outs[][];
        sg = new[split]; te = new[split]; outs = new[split];
        for (int p = 0; p < split; p++) begin
          int bt[]; bit mk[];
          bt = new[np]; mk = new[np];
          for (int i = 0; i < np; i++) begin
            int n = p*np + i;
            mk[i] = h[m*n_cols+n];
            bt[i] = mk[i] ? sat(post[n] - alpha[m*n_cols+n], w) : 0;
          end
          // Local pass first to get the partition's sign and flag.
          chnu(bt, mk, t, 0, 0, s_num, s_shift, w, outs[p], sg[p], te[p]);
        end
        for (int p = 0; p < split; p++) begin
          int bt[]; bit mk[]; int al[]; bit so, to, si, ti;
          bt = new[np]; mk = new[np];
          si = 0; ti = 0;
          for (int q = 0; q < split; q++) if (q != p) begin si ^= sg[q]; ti |= te[q]; end
          for (int i = 0; i < np; i++) begin
            int n = p*np + i;
            mk[i] = h[m*n_cols+n];
            bt[i] = mk[i] ? sat(post[n] - alpha[m*n_cols+n], w) : 0;
          end
          chnu(bt, mk, t, si, ti, s_num, s_shift, w, al, so, to);
          for (int i = 0; i < np; i++) begin
            int n = p*np + i;
            if (mk[i]) begin
              alpha[m*n_cols+n] = al[i];
              acc[n] += al[i];
            end
          end
        end
      end
      foreach (post[n]) post[n] = acc[n];
      foreach (dec[n]) dec[n] = (post[n] < 0);
      ok = (syndrome_weight(h, m_rows, n_cols, dec) == 0);
      if (ok) return it + 1;
    end
    return max_iter;
  endfunction

endpackage
