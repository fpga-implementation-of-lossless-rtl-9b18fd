// ecg_ref_pkg: reference model of the lossless ECG compressor for the
// testbenches, written with plain integer arithmetic (multiplications,
// divisions, absolute values) rather than the shifts and masks of the RTL.
//
// predict()      prediction of sample n of a stream from its history
// map_err()      signed error to the non-negative coded value
// select_k_ref() Golomb-Rice parameter of a window
// encode()       the full bit stream of one stream, padded to 16-bit words
// decode()       the inverse of encode(), to show the coding is lossless
// ecg_sample()   a synthetic ECG-like test signal
package ecg_ref_pkg;

  typedef bit bitq_t[$];
  typedef int intq_t[$];

  localparam int SMAX   = 2047;
  localparam int WORD   = 16;

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // Predictor number used for sample n (1, 2 or 3); 0 for the raw sample.
  function automatic int choose(const ref intq_t x, input int n);
    int b1, b2, b3;
    if (n == 0) return 0;
    if (n < 4) return n;
    b1 = iabs(x[n-1] - x[n-2]);
    b2 = iabs(x[n-1] - 2*x[n-2] + x[n-3]);
    b3 = iabs(x[n-1] - 3*x[n-2] + 3*x[n-3] - x[n-4]);
    if (b1 <= b2 && b1 <= b3) return 1;
    if (b2 <= b3) return 2;
    return 3;
  endfunction

  // Unclamped prediction of x[n].
  function automatic int predict_raw(const ref intq_t x, input int n);
    case (choose(x, n))
      1: return x[n-1];
      2: return 2*x[n-1] - x[n-2];
      3: return 3*x[n-1] - 3*x[n-2] + x[n-3];
      default: return 0;
    endcase
  endfunction

  function automatic int clampp(int p);
    if (p < 0) return 0;
    if (p > SMAX) return SMAX;
    return p;
  endfunction

  function automatic int map_err(int e);
    return e >= 0 ? 2*e : -2*e - 1;
  endfunction

  function automatic int unmap_err(int m);
    return (m % 2 == 0) ? m / 2 : -(m + 1) / 2;
  endfunction

  function automatic int select_k_ref(int sum, int n);
    for (int k = 0; k < 7; k++) if (n * (2**k) >= sum) return k;
    return 7;
  endfunction

  function automatic void push_bits(ref bitq_t q, input int value, input int nbits);
    for (int i = nbits - 1; i >= 0; i--) q.push_back(bit'((value / (2**i)) % 2));
  endfunction

  function automatic void push_code(ref bitq_t q, input int m, input int k);
    int u = m / (2**k);
    for (int i = 0; i < u; i++) q.push_back(1'b1);
    q.push_back(1'b0);
    push_bits(q, m % (2**k), k);
  endfunction

  // Mapped errors of samples 1..N-1.
  function automatic intq_t errors(const ref intq_t x);
    intq_t m;
    for (int n = 1; n < x.size(); n++)
      m.push_back(map_err(x[n] - clampp(predict_raw(x, n))));
    return m;
  endfunction

  // Coded bits of a stream whose mapped errors are m (no padding).
  function automatic bitq_t encode_errors(input int first, const ref intq_t m,
                                          input int window);
    bitq_t q;
    push_bits(q, first, 11);
    for (int w = 0; w < m.size(); w += window) begin
      int n   = (m.size() - w < window) ? m.size() - w : window;
      int sum = 0;
      int k;
      for (int i = 0; i < n; i++) sum += m[w+i];
      k = select_k_ref(sum, n);
      push_bits(q, k, 3);
      for (int i = 0; i < n; i++) push_code(q, m[w+i], k);
    end
    return q;
  endfunction

  function automatic bitq_t pad(input bitq_t q);
    while (q.size() % WORD != 0) q.push_back(1'b0);
    return q;
  endfunction

  function automatic bitq_t encode(const ref intq_t x, input int window);
    intq_t m = errors(x);
    return pad(encode_errors(x[0], m, window));
  endfunction

  function automatic int take(const ref bitq_t q, ref int pos, input int nbits);
    int v = 0;
    for (int i = 0; i < nbits; i++) begin
      v = v * 2 + int'(q[pos]);
      pos++;
    end
    return v;
  endfunction

  // Rebuild n samples from a bit stream.
  function automatic intq_t decode(const ref bitq_t q, input int n, input int window);
    intq_t x;
    int pos = 0;
    if (n == 0) return x;
    x.push_back(take(q, pos, 11));
    for (int w = 1; w < n; w += window) begin
      int cnt = (n - w < window) ? n - w : window;
      int k   = take(q, pos, 3);
      for (int i = 0; i < cnt; i++) begin
        int u = 0;
        int m;
        while (q[pos] == 1'b1) begin u++; pos++; end
        pos++;
        m = u * (2**k) + take(q, pos, k);
        x.push_back(clampp(predict_raw(x, x.size())) + unmap_err(m));
      end
    end
    return x;
  endfunction

  // Synthetic ECG-like signal: baseline wander, P, QRS and T waves built
  // from triangles, plus small pseudo-random noise. t is the sample index.
  function automatic int tri_wave(int t, int centre, int half, int height);
    int d = iabs(t - centre);
    return d >= half ? 0 : height * (half - d) / half;
  endfunction

  function automatic int ecg_sample(int t, int period, int noise);
    int ph = t % period;
    int v  = 1024;
    v += 20 * ((t / 7) % 9) - 80;                 // slow wander (stepped)
    v += tri_wave(ph, period/5,      period/16, 60);   // P
    v -= tri_wave(ph, period/3 - 4,  3, 60);           // Q
    v += tri_wave(ph, period/3,      5, 700);          // R
    v -= tri_wave(ph, period/3 + 6,  4, 150);          // S
    v += tri_wave(ph, 2*period/3,    period/10, 150);  // T
    v += noise;
    return clampp(v);
  endfunction

endpackage
