// tb_ref_pkg: reference model for the testbenches. Computes a decimating
// FIR filter the straightforward way, y[m] = sum_k h[k] x[D*m - k] with
// x[n] = 0 for n < 0, in 64-bit arithmetic, then optionally rounds away
// `shift` fraction bits (round half up) and saturates to `ow` bits. It
// shares no code with the polyphase / transposed RTL it is compared with.
package tb_ref_pkg;

  typedef longint lq_t[$];

  function automatic lq_t ref_decim(input lq_t x, input lq_t h, input int d,
                                    input int shift, input int ow);
    lq_t y;
    longint acc, mx, mn;
    y = {};
    for (int m = 0; d * m < x.size(); m++) begin
      acc = 0;
      for (int k = 0; k < h.size(); k++)
        if (d * m - k >= 0) acc += h[k] * x[d * m - k];
      if (shift > 0) acc = (acc + (longint'(1) <<< (shift - 1))) >>> shift;
      if (ow > 0) begin
        mx = (longint'(1) <<< (ow - 1)) - 1;
        mn = -(longint'(1) <<< (ow - 1));
        if (acc > mx) acc = mx;
        if (acc < mn) acc = mn;
      end
      y.push_back(acc);
    end
    return y;
  endfunction

  // Binomial (1+z^-1)^n taps.
  function automatic lq_t binom(input int n);
    lq_t h;
    h = {1};
    for (int i = 0; i < n; i++) begin
      lq_t g;
      g = {};
      for (int k = 0; k <= h.size(); k++)
        g.push_back((k < h.size() ? h[k] : 0) + (k > 0 ? h[k-1] : 0));
      h = g;
    end
    return h;
  endfunction

  // Moving-sum (1 + z^-1 + ... + z^-(len-1))^n taps.
  function automatic lq_t boxcar_pow(input int len, input int n);
    lq_t h;
    h = {1};
    for (int i = 0; i < n; i++) begin
      lq_t g;
      g = {};
      for (int k = 0; k < h.size() + len - 1; k++) begin
        longint s;
        s = 0;
        for (int j = 0; j < len; j++)
          if (k - j >= 0 && k - j < h.size()) s += h[k-j];
        g.push_back(s);
      end
      h = g;
    end
    return h;
  endfunction

endpackage
