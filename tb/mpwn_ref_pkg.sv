// Reference model for the testbenches of the MPWN accelerator.
//
// Binary16 arithmetic is modelled with the simulator's double-precision real
// type: the exact product or sum of two halves always fits in a double, and
// r2h() rounds it to half with ties to even, so ref_mul/ref_add give the
// correctly rounded IEEE result independently of the RTL's integer datapath.
// On top of that sit reference versions of the weight-space products, of the
// dot-product order used by the engines (lanes summed pairwise, beats
// accumulated in order), of batch normalization + ReLU, max pooling, the
// convolutional and the fully-connected layers, and a weight-word packer for
// the load port.
package mpwn_ref_pkg;

  typedef logic [15:0] h16_t;
  typedef h16_t        hvec_t [];

  function automatic real pow2(int n);
    real r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic bit is_nan(h16_t h);
    return (h[14:10] == 5'h1F) && (h[9:0] != 0);
  endfunction

  // Finite halves only.
  function automatic real h2r(h16_t h);
    real v;
    if (h[14:10] == 0) v = real'(h[9:0]) * pow2(-24);
    else               v = real'(1024 + h[9:0]) * pow2(int'(h[14:10]) - 25);
    return h[15] ? -v : v;
  endfunction

  function automatic h16_t r2h(real x);
    logic  s;
    real   ax, q, fl, fr;
    int    u, qe;
    s  = $realtobits(x) >> 63;
    ax = s ? -x : x;
    if (ax == 0.0) return {s, 15'd0};
    u = 0;
    while (ax >= pow2(u + 1)) u++;
    while (ax < pow2(u)) u--;
    qe = (u < -14) ? -24 : u - 10;
    q  = ax / pow2(qe);
    fl = $floor(q);
    fr = q - fl;
    if (fr > 0.5 || (fr == 0.5 && (longint'(fl) % 2 == 1))) fl = fl + 1.0;
    if (fl == 2048.0) begin fl = 1024.0; qe++; end
    if (fl < 1024.0) return {s, 15'(longint'(fl))};            // subnormal or zero
    if (qe + 25 >= 31) return {s, 15'h7C00};                   // overflow
    return {s, 5'(qe + 25), 10'(longint'(fl) - 1024)};
  endfunction

  function automatic bit is_inf(h16_t h);
    return (h[14:10] == 5'h1F) && (h[9:0] == 0);
  endfunction

  function automatic h16_t ref_mul(h16_t a, h16_t b);
    if (is_nan(a) || is_nan(b)) return 16'h7E00;
    if ((is_inf(a) && b[14:0] == 0) || (is_inf(b) && a[14:0] == 0)) return 16'h7E00;
    if (is_inf(a) || is_inf(b)) return {a[15] ^ b[15], 15'h7C00};
    if (a[14:0] == 0 || b[14:0] == 0) return {a[15] ^ b[15], 15'd0};
    return r2h(h2r(a) * h2r(b));
  endfunction

  function automatic h16_t ref_add(h16_t a, h16_t b);
    real s;
    if (is_nan(a) || is_nan(b)) return 16'h7E00;
    if (is_inf(a) && is_inf(b) && a[15] != b[15]) return 16'h7E00;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    s = h2r(a) + h2r(b);
    if (s == 0.0) return {a[15] & b[15], 15'd0};
    return r2h(s);
  endfunction

  // Same value, or both NaN.
  function automatic bit h_same(h16_t a, h16_t b);
    if (is_nan(a) && is_nan(b)) return 1'b1;
    return a == b;
  endfunction

  // Weight-space codes: 0 = F, 1 = B, 2 = T (as mpwn_pkg::wspace_e).
  function automatic int ws_bits(int ws);
    return (ws == 1) ? 1 : (ws == 2) ? 2 : 16;
  endfunction

  // Product of a weight of space ws and a half activation.
  function automatic h16_t ref_wmul(int ws, h16_t w, h16_t x);
    if (ws == 0) return ref_mul(w, x);
    if (ws == 1) return w[0] ? r2h(-h2r(x)) : x;                  // -1 or +1
    // ternary: -1, 0 (sign kept from the activation), +1
    if (w[1:0] == 2'b00) return {x[15], 15'd0};
    if (w[1:0] == 2'b01) return x;
    return r2h(-h2r(x));
  endfunction

  // A random weight of space ws; F weights are uniform in (-fmax, fmax).
  function automatic h16_t rand_weight(int ws, real fmax);
    int unsigned r = $urandom;
    if (ws == 1) return 16'(r % 2);
    if (ws == 2) begin
      case (r % 4)
        0, 1:    return 16'b00;
        2:       return 16'b01;
        default: return 16'b11;
      endcase
    end
    return r2h(((real'(r % 20001) / 10000.0) - 1.0) * fmax);
  endfunction

  function automatic h16_t rand_half(real lo, real hi);
    return r2h(lo + (hi - lo) * real'($urandom % 100001) / 100000.0);
  endfunction

  // Dot product in the engine's order.  a[], w[] hold n terms from offset 0.
  function automatic h16_t ref_dot(int ws, int lanes, h16_t a[], h16_t w[], int n);
    h16_t acc, lv[];
    int   words = (n + lanes - 1) / lanes;
    int   sz;
    acc = 16'h0000;
    for (int t = 0; t < words; t++) begin
      lv = new[lanes];
      for (int p = 0; p < lanes; p++)
        lv[p] = (t * lanes + p < n) ? ref_wmul(ws, w[t*lanes+p], a[t*lanes+p]) : 16'h0000;
      sz = lanes;
      while (sz > 1) begin
        for (int i = 0; i < sz / 2; i++) lv[i] = ref_add(lv[2*i], lv[2*i+1]);
        sz = sz / 2;
      end
      acc = (t == 0) ? lv[0] : ref_add(acc, lv[0]);
    end
    return acc;
  endfunction

  function automatic h16_t ref_bn(h16_t x, h16_t scale, h16_t shift, bit use_scale, bit use_relu);
    h16_t y = use_scale ? ref_mul(x, scale) : x;
    y = ref_add(y, shift);
    if (use_relu && y[15]) y = 16'h0000;
    return y;
  endfunction

  // Valid convolution, weights in (n, k, j, i) order, then BN + ReLU.
  function automatic void ref_conv(int ws, int lanes, int cin, int cout, int k, int ih, int iw,
                                   h16_t x[], h16_t w[], h16_t scale[], h16_t shift[],
                                   output h16_t y[]);
    int oh = ih - k + 1, ow = iw - k + 1, ntap = cin * k * k;
    h16_t a[], wv[];
    y  = new[cout * oh * ow];
    a  = new[ntap];
    wv = new[ntap];
    for (int n = 0; n < cout; n++)
      for (int m = 0; m < oh; m++)
        for (int l = 0; l < ow; l++) begin
          for (int q = 0; q < ntap; q++) begin
            int kk = q / (k * k), r = q % (k * k);
            a[q]  = x[kk*ih*iw + (m + r / k) * iw + l + r % k];
            wv[q] = w[n*ntap + q];
          end
          y[n*oh*ow + m*ow + l] =
            ref_bn(ref_dot(ws, lanes, a, wv, ntap), scale[n], shift[n], 1'b1, 1'b1);
        end
  endfunction

  function automatic h16_t hmax(h16_t a, h16_t b);
    return (h2r(b) > h2r(a)) ? b : a;
  endfunction

  function automatic void ref_pool(int c, int ih, int iw, h16_t x[], output h16_t y[]);
    int oh = ih / 2, ow = iw / 2;
    y = new[c * oh * ow];
    for (int ch = 0; ch < c; ch++)
      for (int m = 0; m < oh; m++)
        for (int l = 0; l < ow; l++)
          y[ch*oh*ow + m*ow + l] =
            hmax(hmax(x[ch*ih*iw + 2*m*iw + 2*l],     x[ch*ih*iw + 2*m*iw + 2*l + 1]),
                 hmax(x[ch*ih*iw + (2*m+1)*iw + 2*l], x[ch*ih*iw + (2*m+1)*iw + 2*l + 1]));
  endfunction

  // Weights in (row, column) order.
  function automatic void ref_fc(int ws, int lanes, int cin, int cout, h16_t x[], h16_t w[],
                                 h16_t scale[], h16_t shift[], bit use_scale, bit use_relu,
                                 output h16_t y[]);
    h16_t wv[];
    y  = new[cout];
    wv = new[cin];
    for (int n = 0; n < cout; n++) begin
      for (int c = 0; c < cin; c++) wv[c] = w[n*cin + c];
      y[n] = ref_bn(ref_dot(ws, lanes, x, wv, cin), scale[n], shift[n], use_scale, use_relu);
    end
  endfunction

  // Load word `word` of output `n` of a layer with dot length ntap: lane p holds
  // weight n*ntap + word*lanes + p, in bits [p*WB +: WB].
  function automatic logic [255:0] pack_word(int ws, int lanes, h16_t w[], int ntap, int n, int word);
    logic [255:0] v = '0;
    int wb = ws_bits(ws);
    for (int p = 0; p < lanes; p++)
      if (word * lanes + p < ntap)
        for (int b = 0; b < wb; b++) v[p*wb + b] = w[n*ntap + word*lanes + p][b];
    return v;
  endfunction

endpackage
