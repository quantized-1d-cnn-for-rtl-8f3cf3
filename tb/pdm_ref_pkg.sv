// pdm_ref_pkg: bit-true reference model of the quantized two-layer 1D-CNN,
// written directly from the network definition (no hardware schedule):
//   c1[i] = T( b1 + sum_k w1[k] * x[64 i + k] )            x = +1/-1
//   y[j]  = T( b2 + sum_k w2[k] * c1[2 j - PAD_L + k] )     c1 outside = 0
// with the sum accumulated bias-first, tap 0 first, saturating to 15-bit
// Q4.11 after every step, CONV2 products truncated from Q2.14 to Q4.11, and
// T(x) = sign(x) * min(127, round(128 tanh(floor(|x|/8)/256))).
// Also provides first- and second-order sigma-delta modulators for PDM test input.
package pdm_ref_pkg;

  localparam int K1 = 64;
  localparam int K2 = 23;
  localparam int S2 = 2;

  function automatic int sat15(int v);
    if (v > 16383) return 16383;
    if (v < -16384) return -16384;
    return v;
  endfunction

  function automatic int tanh_q(int x);
    int  m, i, q;
    real v;
    m = (x < 0) ? -x : x;
    i = m / 8;
    v = $tanh(real'(i) / 256.0) * 128.0;
    q = int'($floor(v + 0.5));
    if (q > 127) q = 127;
    return (x < 0) ? -q : q;
  endfunction

  // CONV2 "same" padding on the left for a CONV1 output length n1
  function automatic int pad_left(int n1);
    int n2, tot;
    n2  = (n1 + S2 - 1) / S2;
    tot = (n2 - 1) * S2 + K2 - n1;
    if (tot < 0) tot = 0;
    return tot / 2;
  endfunction

  // CONV1 output i of a window; sat_hits counts saturated accumulations
  function automatic int conv1(const ref bit x[], input int base, input int b1,
                               const ref int w1[], ref int sat_hits);
    int acc, s;
    acc = b1 * 16;
    for (int k = 0; k < K1; k++) begin
      s = acc + w1[k] * (x[base + k] ? 16 : -16);
      if (s != sat15(s)) sat_hits++;
      acc = sat15(s);
    end
    return tanh_q(acc);
  endfunction

  // Full network over one window of x starting at offset off, wbits long.
  function automatic void network(const ref bit x[], input int off, input int wbits,
                                  input int b1, const ref int w1[],
                                  input int b2, const ref int w2[],
                                  ref int y[], ref int sat_hits);
    int n1, n2, pl, acc, a, idx;
    int c1[];
    n1 = wbits / K1;
    n2 = (n1 + S2 - 1) / S2;
    pl = pad_left(n1);
    c1 = new[n1];
    for (int i = 0; i < n1; i++) c1[i] = conv1(x, off + K1 * i, b1, w1, sat_hits);
    y = new[n2];
    for (int j = 0; j < n2; j++) begin
      acc = b2 * 16;
      for (int k = 0; k < K2; k++) begin
        idx = S2 * j - pl + k;
        a = (idx >= 0 && idx < n1) ? c1[idx] : 0;
        acc = sat15(acc + ((w2[k] * a) >>> 3));
      end
      y[j] = tanh_q(acc);
    end
  endfunction

  // First-order sigma-delta modulation of a sum of two sines (amplitude < 1)
  function automatic void make_pdm(ref bit x[], input int n, input real f1, input real f2,
                                   input real amp);
    real integ, u;
    integ = 0.0;
    x = new[n];
    for (int t = 0; t < n; t++) begin
      u = amp * (0.7 * $sin(2.0 * 3.141592653589793 * f1 * t) +
                 0.3 * $sin(2.0 * 3.141592653589793 * f2 * t));
      integ = integ + u - ((integ >= 0.0) ? 1.0 : -1.0);
      x[t] = (integ >= 0.0);
    end
  endfunction

  // Second-order sigma-delta modulation of a single tone (amplitude < 0.5)
  function automatic void make_pdm_tone(ref bit x[], input int n, input real f, input real amp);
    real i1, i2, y;
    i1 = 0.0;
    i2 = 0.0;
    y  = 1.0;
    x  = new[n];
    for (int t = 0; t < n; t++) begin
      i1 = i1 + amp * $sin(2.0 * 3.141592653589793 * f * t) - y;
      i2 = i2 + i1 - y;
      y  = (i2 >= 0.0) ? 1.0 : -1.0;
      x[t] = (y > 0.0);
    end
  endfunction

  // signed 8-bit value of a byte
  function automatic int s8(logic [7:0] b);
    return int'($signed(b));
  endfunction

endpackage
