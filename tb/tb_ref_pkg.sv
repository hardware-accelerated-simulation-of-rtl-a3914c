// tb_ref_pkg: floating-point reference models used by the testbenches. They
// follow the block descriptions (exact rotation by the oscillator angle,
// exact polar clipping from the true magnitude) rather than the CORDIC
// arithmetic of the RTL, so the testbenches compare against values worked
// out independently and allow a few LSB of tolerance.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int sat16(input real v);
    int r;
    r = $rtoi(v < 0.0 ? v - 0.5 : v + 0.5);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  // Up-conversion of interleaved carrier frames. bi/bq hold n_frames*nc words
  // (carrier-interleaved). Output: n_frames * 2**log2l samples.
  function automatic void ref_duc(input int bi[$], input int bq[$], input int nc,
                                  input int unsigned freq[2], input int log2l,
                                  output int oi[$], output int oq[$]);
    int nf, l;
    int pi_[2], pq_[2], ci[2], cq[2];
    longint unsigned ph[2];
    oi = {};
    oq = {};
    l  = 1 << log2l;
    nf = bi.size() / nc;
    for (int c = 0; c < 2; c++) begin
      pi_[c] = 0; pq_[c] = 0; ci[c] = 0; cq[c] = 0; ph[c] = 0;
    end
    for (int n = 0; n < nf; n++) begin
      for (int c = 0; c < 2; c++) begin
        pi_[c] = ci[c];
        pq_[c] = cq[c];
        ci[c]  = (c < nc) ? bi[n*nc + c] : 0;
        cq[c]  = (c < nc) ? bq[n*nc + c] : 0;
      end
      for (int m = 0; m < l; m++) begin
        real si, sq;
        si = 0.0;
        sq = 0.0;
        for (int c = 0; c < 2; c++) begin
          int ui, uq;
          real th;
          ui = pi_[c] + (((ci[c] - pi_[c]) * m) >>> log2l);
          uq = pq_[c] + (((cq[c] - pq_[c]) * m) >>> log2l);
          th = 2.0 * PI * real'(ph[c] >> 16) / 65536.0;
          si += real'(ui) * $cos(th) - real'(uq) * $sin(th);
          sq += real'(ui) * $sin(th) + real'(uq) * $cos(th);
          ph[c] = (ph[c] + freq[c]) & 64'hFFFF_FFFF;
        end
        oi.push_back(sat16(si));
        oq.push_back(sat16(sq));
      end
    end
  endfunction

  // Crest factor reduction. A peak is a sample whose magnitude is above the
  // threshold and is a local maximum (>= the sample before, > the sample
  // after). Its polar clipping error, weighted, is shaped by the pulse and
  // added to the stream, which is delayed by 1 + 7 samples:
  //   y[j] = x[j-8] + sum_k taps[k]/2**14 * e[j-1-k].
  // One output per input. amb[j] marks outputs the RTL may legitimately
  // compute differently: near a pair of neighbouring samples whose
  // magnitudes are within 4 LSB of each other, the choice of the maximum
  // depends on a few LSB of rounding.
  function automatic void ref_cfr(input int xi[$], input int xq[$], input int thr,
                                  input int weight, input int taps[15],
                                  output int yi[$], output int yq[$],
                                  output int n_peaks, output bit amb[$]);
    real ei[$], eq[$], mg[$];
    int n;
    n = xi.size();
    yi = {};
    yq = {};
    amb = {};
    n_peaks = 0;
    for (int j = 0; j < n; j++) mg.push_back($sqrt(real'(xi[j])**2 + real'(xq[j])**2));
    for (int j = 0; j < n; j++) begin
      real g, mprev, mnext;
      mprev = (j > 0) ? mg[j-1] : 0.0;
      mnext = (j + 1 < n) ? mg[j+1] : 0.0;
      g = 0.0;
      if (mg[j] > real'(thr) && mg[j] >= mprev && mg[j] > mnext) begin
        g = real'(thr) / mg[j] - 1.0;
        n_peaks++;
      end
      ei.push_back(real'(xi[j]) * g * real'(weight) / 32768.0);
      eq.push_back(real'(xq[j]) * g * real'(weight) / 32768.0);
      amb.push_back(0);
    end
    for (int j = 0; j + 1 < n; j++)
      if (mg[j] > real'(thr) - 4.0 && mg[j+1] > real'(thr) - 4.0 && rabs(mg[j] - mg[j+1]) < 4.0)
        for (int o = j - 1; o <= j + 24; o++)
          if (o >= 0 && o < n) amb[o] = 1;
    for (int j = 0; j < n; j++) begin
      real ai, aq;
      ai = (j >= 8) ? real'(xi[j-8]) : 0.0;
      aq = (j >= 8) ? real'(xq[j-8]) : 0.0;
      for (int k = 0; k < 15; k++) begin
        if (j - 1 - k >= 0) begin
          ai += real'(taps[k]) / 16384.0 * ei[j-1-k];
          aq += real'(taps[k]) / 16384.0 * eq[j-1-k];
        end
      end
      yi.push_back(sat16(ai));
      yq.push_back(sat16(aq));
    end
  endfunction

  // The default raised-cosine cancellation pulse: round(sin^2(pi*(k+1)/16)*2**14).
  function automatic void default_taps(output int t[15]);
    for (int k = 0; k < 15; k++) t[k] = sat16($sin(PI * real'(k + 1) / 16.0) ** 2 * 16384.0);
  endfunction

endpackage
