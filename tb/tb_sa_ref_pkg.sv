// Reference helpers for the divider testbenches.
//
// Works on 512-bit unsigned words so that any configuration up to 256-bit
// dividends can be modelled. The quotient and remainder checks use the
// language's own / and % operators; ref_steps() replays the step rule of
// the algorithm (largest safe power-of-two multiple of X, then one final
// unit step) to predict the iteration count and the partial remainders.
package tb_sa_ref_pkg;

  typedef logic [511:0] word_t;

  // Significant bits, scanned from the MSB down.
  function automatic int bits_of(word_t v);
    for (int i = 511; i >= 0; i--) if (v[i]) return i + 1;
    return 0;
  endfunction

  // Random word with exactly len significant bits (len = 0 gives zero).
  function automatic word_t rand_len(int len);
    word_t v;
    for (int i = 0; i < 16; i++) v[i*32 +: 32] = $urandom;
    if (len <= 0) return '0;
    v = v & ((word_t'(1) << len) - 1);
    v[len-1] = 1'b1;
    return v;
  endfunction

  // Replays the division step by step; returns the number of accepted
  // steps and fills rems with the partial remainder after each one.
  function automatic int ref_steps(word_t y, word_t x, ref word_t rems[$]);
    int n, m, a;
    int it = 0;
    rems.delete();
    if (x == '0) return 0;
    forever begin
      n = bits_of(y);
      m = bits_of(x);
      a = n - m;
      if (a >= 1)                y = y - (x << (a - 1));
      else if (a == 0 && y >= x) y = y - x;
      else                       break;
      it++;
      rems.push_back(y);
    end
    return it;
  endfunction

endpackage
