// agu_ref_pkg: reference models of the address sequences, for the
// testbenches. Each function returns the k-th address (k = 0, 1, ..) of a
// mode, computed directly from the closed-form description of the access
// pattern rather than step by step as the hardware does. Results are not
// reduced to the address width; callers mask them.
package agu_ref_pkg;
  import agu_pkg::*;

  // One generator's configuration, as the reference models see it.
  typedef struct {
    agu_mode_e   mode;
    int unsigned n, m, len, step, wd, ht, sl, l2, base;
    bit          circ;
  } ref_cfg_t;

  function automatic int unsigned ref_bitrev(int unsigned log2n, int unsigned k);
    int unsigned x = k % (1 << log2n), y = 0;
    for (int unsigned i = 0; i < log2n; i++) if (x[i]) y |= 1 << (log2n - 1 - i);
    return y;
  endfunction

  // Operand address of a radix-2 in-place FFT: stage s pairs addresses that
  // differ in bit s; butterflies in order of their upper address.
  function automatic int unsigned ref_fft_data(int unsigned log2n, int unsigned k);
    int unsigned n = 1 << log2n;
    int unsigned kk = k % (n * log2n);
    int unsigned s = kk / n, w = kk % n, b = w / 2, upper;
    upper = ((b >> s) << (s + 1)) | (b & ((1 << s) - 1));
    return (w % 2 != 0) ? (upper | (1 << s)) : upper;
  endfunction

  // Twiddle index W_N^e of each operand slot (held for both operands).
  function automatic int unsigned ref_fft_tw(int unsigned log2n, int unsigned k);
    int unsigned n = 1 << log2n;
    int unsigned kk = k % (n * log2n);
    int unsigned s = kk / n, b = (kk % n) / 2;
    return (b & ((1 << s) - 1)) << (log2n - 1 - s);
  endfunction

  // Zero-padded stored convolution: output j reads padded samples j..j+M-1.
  function automatic int unsigned ref_conv_stored(int unsigned n, int unsigned m, int unsigned k);
    int unsigned kk = k % ((n + m - 1) * m);
    return kk / m + kk % m;
  endfunction

  // Streaming convolution: output j reads the circular buffer from j on.
  function automatic int unsigned ref_conv_stream(int unsigned n, int unsigned k);
    return ((k / n) % n + k % n) % n;
  endfunction

  function automatic int unsigned ref_modulo(int unsigned m, int unsigned step, int unsigned k);
    return (k * step) % m;
  endfunction

  function automatic int unsigned ref_divide(int unsigned m, int unsigned len, bit circ, int unsigned k);
    return circ ? (k / m) % len : k / m;
  endfunction

  // Symmetric FIR: oldest, newest, second oldest, second newest, ...
  function automatic int unsigned ref_lpfir(int unsigned n, int unsigned k);
    int unsigned j = k / n, i = k % n, pos;
    pos = (i % 2 == 0) ? i / 2 : n - 1 - i / 2;
    return (j + pos) % n;
  endfunction

  function automatic int unsigned ref_me(int unsigned mbwd, int unsigned mbht, int unsigned slwd,
                                         int unsigned k);
    int unsigned kk = k % ((mbwd + 1) * (mbht + 1));
    return (kk / (mbwd + 1)) * slwd + kk % (mbwd + 1);
  endfunction

  // JPEG zigzag: anti-diagonal d, even d walked upwards, odd d downwards.
  function automatic int unsigned ref_zigzag(int unsigned n, int unsigned k);
    int unsigned kk = k % (n * n), idx = 0, r;
    int lo, hi;
    for (int d = 0; d <= 2 * int'(n) - 2; d++) begin
      lo = (d - int'(n) + 1 > 0) ? d - int'(n) + 1 : 0;
      hi = (d < int'(n) - 1) ? d : int'(n) - 1;
      for (int i = 0; i <= hi - lo; i++) begin
        r = (d % 2 == 0) ? hi - i : lo + i;
        if (idx == kk) return r * n + (d - r);
        idx++;
      end
    end
    return 0;
  endfunction

  // Offset (before the base is added) of address k in mode c.mode.
  function automatic int unsigned ref_off(ref_cfg_t c, int unsigned k);
    case (c.mode)
      MODE_INC:         return k * c.step;
      MODE_DEC:         return -(k * c.step);
      MODE_BITREV:      return ref_bitrev(c.l2, k);
      MODE_FFT_DATA:    return ref_fft_data(c.l2, k);
      MODE_FFT_TW:      return ref_fft_tw(c.l2, k);
      MODE_CONV_STORED: return ref_conv_stored(c.n, c.m, k);
      MODE_CONV_STREAM: return ref_conv_stream(c.n, k);
      MODE_MODULO:      return ref_modulo(c.m, c.step, k);
      MODE_DIVIDE:      return ref_divide(c.m, c.len, c.circ, k);
      MODE_LPFIR:       return ref_lpfir(c.n, k);
      MODE_ME:          return ref_me(c.wd, c.ht, c.sl, k);
      MODE_ZIGZAG:      return ref_zigzag(c.n, k);
      default:          return 0;
    endcase
  endfunction

  // Expected {mark, seq_end} at address k.
  function automatic bit [1:0] ref_flags(ref_cfg_t c, int unsigned k);
    int unsigned p;
    case (c.mode)
      MODE_BITREV:      begin p = 1 << c.l2;               return {2{(k % p) == p - 1}}; end
      MODE_FFT_DATA,
      MODE_FFT_TW:      begin p = (1 << c.l2) * c.l2;      return {2{(k % p) == p - 1}}; end
      MODE_CONV_STORED: begin p = (c.n + c.m - 1) * c.m;
                              return {(k % c.m) == c.m - 1, (k % p) == p - 1}; end
      MODE_CONV_STREAM,
      MODE_LPFIR:       return {(k % c.n) == c.n - 1, 1'b0};
      MODE_MODULO:      return {(ref_modulo(c.m, c.step, k) + c.step) >= c.m, 1'b0};
      MODE_DIVIDE:      return {(k % c.m) == c.m - 1, 1'b0};
      MODE_ME:          begin p = (c.wd + 1) * (c.ht + 1); return {2{(k % p) == p - 1}}; end
      MODE_ZIGZAG:      begin p = c.n * c.n;               return {2{(k % p) == p - 1}}; end
      default:          return 2'b00;
    endcase
  endfunction

endpackage
