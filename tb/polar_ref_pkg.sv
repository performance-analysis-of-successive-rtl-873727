// polar_ref_pkg: reference model for the polar decoder testbenches.
//
// A bit-by-bit successive-cancellation decoder written from the textbook
// recursion (f and g functions on sign-magnitude LLRs, natural bit order,
// x = u * F^(x)n), a polar encoder, a frozen-set construction from the
// Bhattacharyya parameters of a binary erasure channel, and a noisy BPSK
// LLR generator.  The model decides every bit at the leaves; for a right
// leaf it uses the sign of g(c,d,u) with a tie |c| = |d| resolved toward c,
// the convention the hardware's two-bit last stage uses.
package polar_ref_pkg;

  typedef int unsigned uint_q[$];
  typedef bit          bit_q[$];

  // Sign-magnitude helpers on codes of width q.
  function automatic int sm_sign(int v, int q); return (v >> (q - 1)) & 1; endfunction
  function automatic int sm_mag(int v, int q);  return v & ((1 << (q - 1)) - 1); endfunction
  function automatic int sm_val(int v, int q);
    return sm_sign(v, q) ? -sm_mag(v, q) : sm_mag(v, q);
  endfunction
  function automatic int sm_code(int x, int q);       // saturating, 0 -> +0
    int lim = (1 << (q - 1)) - 1;
    int m = (x < 0) ? -x : x;
    if (m > lim) m = lim;
    return ((x < 0) ? (1 << (q - 1)) : 0) | m;
  endfunction

  function automatic int ref_f(int c, int d, int q);
    int m = (sm_mag(c, q) < sm_mag(d, q)) ? sm_mag(c, q) : sm_mag(d, q);
    return ((sm_sign(c, q) ^ sm_sign(d, q)) << (q - 1)) | m;
  endfunction

  function automatic int ref_g(int c, int d, bit u, int q);
    return sm_code(u ? sm_val(d, q) - sm_val(c, q) : sm_val(d, q) + sm_val(c, q), q);
  endfunction

  // Polar encoding x = u * F^(x)n (natural order).
  function automatic bit_q encode(bit_q u);
    bit_q x = u;
    int n = x.size();
    for (int len = 1; len < n; len *= 2)
      for (int b = 0; b < n; b += 2 * len)
        for (int k = 0; k < len; k++) x[b + k] = x[b + k] ^ x[b + k + len];
    return x;
  endfunction

  // Frozen set of an (n_len, k_len) code: the n_len-k_len positions with
  // the largest erasure-channel Bhattacharyya parameter (design erasure 0.5).
  function automatic bit_q frozen_set(int n_len, int k_len);
    real z [];
    bit_q fz;
    int nl = $clog2(n_len);
    z = new[n_len];
    for (int i = 0; i < n_len; i++) begin
      real v = 0.5;
      for (int b = nl - 1; b >= 0; b--) v = ((i >> b) & 1) ? v * v : 2.0 * v - v * v;
      z[i] = v;
      fz.push_back(1'b0);
    end
    for (int f = 0; f < n_len - k_len; f++) begin
      int worst = -1;
      for (int i = 0; i < n_len; i++)
        if (!fz[i] && (worst < 0 || z[i] > z[worst])) worst = i;
      fz[worst] = 1'b1;
    end
    return fz;
  endfunction

  // Approximately Gaussian sample, zero mean, unit variance.
  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return s - 6.0;
  endfunction

  // Quantized BPSK LLRs of codeword x: mean +/-amp, noise sigma.
  function automatic uint_q make_llrs(bit_q x, real amp, real sigma, int q);
    uint_q l;
    for (int i = 0; i < x.size(); i++) begin
      real v = (x[i] ? -amp : amp) + sigma * gauss();
      l.push_back(sm_code($rtoi(v + (v >= 0 ? 0.5 : -0.5)), q));
    end
    return l;
  endfunction

  // Reference SC decode.  Returns u; x_out receives the re-encoded word.
  function automatic bit_q sc_decode(uint_q llr, bit_q fz, int q, output bit_q x_out);
    int n_len = llr.size();
    int nl = $clog2(n_len);
    int alpha [][];
    bit beta_l [][];
    bit_q u, cur, nxt;
    alpha  = new[nl + 1];
    beta_l = new[nl + 1];
    for (int l = 0; l <= nl; l++) begin
      alpha[l]  = new[n_len >> l];
      beta_l[l] = new[n_len >> l];
    end
    for (int i = 0; i < n_len; i++) alpha[0][i] = int'(llr[i]);
    for (int i = 0; i < n_len; i++) begin
      int l0 = 1;
      bit ui;
      if (i != 0) begin
        int tz = 0;
        while (((i >> tz) & 1) == 0) tz++;
        l0 = nl - tz;
      end
      for (int l = l0; l <= nl; l++) begin
        int half = n_len >> l;
        bit right = (i >> (nl - l)) & 1;
        for (int k = 0; k < half; k++)
          alpha[l][k] = right ? ref_g(alpha[l-1][k], alpha[l-1][k+half], beta_l[l][k], q)
                              : ref_f(alpha[l-1][k], alpha[l-1][k+half], q);
      end
      if (fz[i]) ui = 1'b0;
      else if ((i & 1) == 0) ui = bit'(sm_sign(alpha[nl][0], q));
      else begin
        int c = alpha[nl-1][0], d = alpha[nl-1][1];
        ui = (sm_mag(c, q) >= sm_mag(d, q)) ? bit'(sm_sign(c, q)) ^ u[i-1]
                                            : bit'(sm_sign(d, q));
      end
      u.push_back(ui);
      cur = {};
      cur.push_back(ui);
      for (int l = nl; l >= 1; l--) begin
        if (((i >> (nl - l)) & 1) == 0) begin
          for (int k = 0; k < cur.size(); k++) beta_l[l][k] = cur[k];
          break;
        end
        nxt = {};
        for (int k = 0; k < cur.size(); k++) nxt.push_back(beta_l[l][k] ^ cur[k]);
        for (int k = 0; k < cur.size(); k++) nxt.push_back(cur[k]);
        cur = nxt;
      end
    end
    x_out = encode(u);
    return u;
  endfunction

endpackage
