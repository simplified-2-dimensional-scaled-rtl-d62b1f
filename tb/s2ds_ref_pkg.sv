// s2ds_ref_pkg: behavioural reference model and stimulus helpers for the
// decoder testbenches.
//
// s2ds_ref decodes one frame the way the S2DS min-sum algorithm is written
// down, edge by edge over a dense copy of H, with no shared code with the
// RTL: VTC = clamp(F + sum of the other CTV, -31..31); per check node the
// extrinsic sign product, min1 (first index on ties), min2,
// floor(3*min1/4) and min2 - min1; CTV magnitude floor(3*min1/4) on all
// edges but the min1 edge, which gets floor(3*min1/4) + min2 - min1;
// z = F + sum of all CTV, hard decision z < 0, stop on a zero syndrome
// (checked after every iteration) or after max_it iterations.
// It also counts how often the mechanisms the decoder relies on occur, and
// accumulates min1, min2 and delta-min to compare their average sizes.
//
// channel_llr() draws a BPSK symbol (bit 0 -> +1, bit 1 -> -1) through an
// AWGN channel and quantizes y to Q2.3 (round(8*y), clamped to +-31); the
// min-sum decoder takes F = y directly.
package s2ds_ref_pkg;

  class s2ds_ref;
    int n, m, max_it;
    bit h[][];
    int ctv[][];
    // Results of the last decode().
    bit cw[];
    int iters;
    bit ok;
    // Mechanism counters, accumulated over all frames.
    int n_sat      = 0;   // VTC messages clamped to +-31
    int n_min1edge = 0;   // min1 edges that received a larger magnitude
    int n_early    = 0;   // frames stopped by the syndrome before max_it
    int n_maxstop  = 0;   // frames that ran max_it iterations
    // Sums of min1, min2 and min2 - min1 over all check-node updates, in LSBs.
    longint sum_min1 = 0, sum_min2 = 0, sum_dmin = 0, n_cn = 0;
    int n_fixed    = 0;   // frames whose channel hard decision failed the syndrome but decoded to a codeword

    function new(int n_, int m_, bit h_[][], int max_it_);
      n = n_; m = m_; h = h_; max_it = max_it_;
      ctv = new[m];
      foreach (ctv[r]) ctv[r] = new[n];
      cw = new[n];
    endfunction

    function bit syndrome_ok(bit c[]);
      for (int r = 0; r < m; r++) begin
        bit p = 0;
        for (int k = 0; k < n; k++) if (h[r][k]) p ^= c[k];
        if (p) return 0;
      end
      return 1;
    endfunction

    // Adjacency lists of H, built once.
    int rcols[$][$];   // columns of each row
    int crows[$][$];   // rows of each column

    function void build_lists();
      rcols.delete();
      crows.delete();
      for (int r = 0; r < m; r++) begin
        int q[$];
        for (int k = 0; k < n; k++) if (h[r][k]) q.push_back(k);
        rcols.push_back(q);
      end
      for (int k = 0; k < n; k++) begin
        int q[$];
        for (int r = 0; r < m; r++) if (h[r][k]) q.push_back(r);
        crows.push_back(q);
      end
    endfunction

    function void decode(int f[]);
      int  vtc[][];
      bit  channel_wrong;
      if (rcols.size() != m) build_lists();
      vtc = new[m];
      foreach (vtc[r]) vtc[r] = new[n];
      for (int r = 0; r < m; r++) foreach (rcols[r][e]) ctv[r][rcols[r][e]] = 0;
      for (int k = 0; k < n; k++) cw[k] = (f[k] < 0);
      channel_wrong = !syndrome_ok(cw);
      iters = 0;
      ok = 0;
      while (1) begin
        // Variable-node step: extrinsic sums, clamped to the Q2.3 range.
        for (int k = 0; k < n; k++)
          foreach (crows[k][e]) begin
            int r = crows[k][e];
            int s = f[k];
            foreach (crows[k][e2]) if (e2 != e) s += ctv[crows[k][e2]][k];
            if (s > 31)  begin s = 31;  n_sat++; end
            if (s < -31) begin s = -31; n_sat++; end
            vtc[r][k] = s;
          end
        // Check-node step.
        for (int r = 0; r < m; r++) begin
          int m1 = 1000, m2 = 1000, i1 = -1, m1s;
          bit negall = 0;
          foreach (rcols[r][e]) begin
            int k = rcols[r][e];
            int a = (vtc[r][k] < 0) ? -vtc[r][k] : vtc[r][k];
            if (vtc[r][k] < 0) negall ^= 1;
            if (a < m1) begin m2 = m1; m1 = a; i1 = k; end
            else if (a < m2) m2 = a;
          end
          if (m2 == 1000) m2 = 31;   // degree-1 row
          m1s = (3 * m1) / 4;
          sum_min1 += m1;
          sum_min2 += m2;
          sum_dmin += m2 - m1;
          n_cn++;
          foreach (rcols[r][e]) begin
            int k = rcols[r][e];
            bit neg = negall ^ (vtc[r][k] < 0);
            int mag = m1s;
            if (k == i1) begin
              mag = m1s + m2 - m1;
              if (m2 > m1) n_min1edge++;
            end
            ctv[r][k] = neg ? -mag : mag;
          end
        end
        iters++;
        // Tentative decision and stopping test.
        for (int k = 0; k < n; k++) begin
          int z = f[k];
          foreach (crows[k][e]) z += ctv[crows[k][e]][k];
          cw[k] = (z < 0);
        end
        ok = syndrome_ok(cw);
        if (ok || iters == max_it) break;
      end
      if (ok && iters < max_it) n_early++;
      if (iters == max_it) n_maxstop++;
      if (ok && channel_wrong) n_fixed++;
    endfunction
  endclass

  // Standard normal sample (Box-Muller).
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1 << 30))) / real'(1 << 30);
    u2 = (real'($urandom_range(0, 1 << 30))) / real'(1 << 30);
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // Quantized channel LLR for one transmitted bit at noise deviation sigma.
  function automatic int channel_llr(bit b, real sigma);
    real y;
    int  q;
    y = (b ? -1.0 : 1.0) + sigma * gauss();
    q = int'(y * 8.0);          // int'() rounds to nearest
    if (q > 31)  q = 31;
    if (q < -31) q = -31;
    return q;
  endfunction

endpackage
