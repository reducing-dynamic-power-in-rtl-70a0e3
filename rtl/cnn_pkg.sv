// cnn_pkg: types, constants and elaboration-time functions shared by the
// streaming CNN layers.
//
// Activations and weights are 8-bit signed integers. The trained weights of
// the network are hard-coded into the CONV units so that synthesis can fold
// each multiplier around its constant. No trained model ships with this RTL,
// so conv_weight()/conv_bias() stand in for it: they return a fixed
// pseudo-random, bell-shaped int8 weight for every (layer, output map, input
// map, row, column) position. Replacing these two functions with a table of
// real trained weights is the only change needed to run a real network.
//
// The ApproxConv weights are derived from the exact weights exactly as in the
// offline mapping procedure the design is built around: the magnitude at the
// 99th percentile of a layer's weights (W99) is rounded to the nearest power
// of two 2^E, and every weight is mapped to the nearest of the levels
// {0, +-2^E, +-2^(E-1), ..., +-2^(E-NL+1)}. The level index is packed into a
// code of $clog2(2*NL+1) bits (code 0 = zero, 1..NL = +2^(E-c+1),
// NL+1..2NL = -2^(E-(c-NL)+1)). Weights here are integers, so a level of
// 2^k is a left shift by k; E-NL+1 must stay >= 0 (checked by assertion).
package cnn_pkg;

  localparam int ACT_W = 8;
  typedef logic signed [ACT_W-1:0] act_t;

  // Accumulator width used by CONV and ApproxConv units: wide enough for
  // 8b x 8b products summed over up to 2^16 terms plus a bias.
  localparam int ACC_W = 32;
  typedef logic signed [ACC_W-1:0] acc_t;

  // 32-bit integer hash (xorshift-multiply), used only to generate the
  // stand-in weight set.
  function automatic int unsigned mix32(input int unsigned a);
    int unsigned x;
    x = a;
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  // Stand-in trained weight in [-63, 63]: the sum of four uniform bytes,
  // centred and divided by 8, which gives a bell-shaped distribution.
  function automatic int conv_weight(input int layer, input int o, input int i,
                                     input int ky, input int kx);
    int unsigned h;
    int s;
    h = mix32(((((layer * 256 + o) * 256 + i) * 16 + ky) * 16 + kx) ^ 32'h9e3779b9);
    s = int'(h[7:0]) + int'(h[15:8]) + int'(h[23:16]) + int'(h[31:24]) - 510;
    return s / 8;
  endfunction

  // Stand-in bias, in accumulator units, in [-3072, 1023]; mostly negative.
  function automatic int conv_bias(input int layer, input int o);
    int unsigned h;
    h = mix32((layer * 4096 + o) ^ 32'h5bd1e995);
    return int'(h % 4096) - 3072;
  endfunction

  // Exponent E of the largest ApproxConv level: W99 (99th percentile of the
  // weight magnitudes of one layer) rounded to the nearest power of two.
  function automatic int w99_exponent(input int layer, input int no, input int ni,
                                      input int k);
    int hist [0:128];
    int total, need, acc, w99, lo;
    for (int v = 0; v <= 128; v++) hist[v] = 0;
    for (int o = 0; o < no; o++)
      for (int i = 0; i < ni; i++)
        for (int ky = 0; ky < k; ky++)
          for (int kx = 0; kx < k; kx++) begin
            int w;
            w = conv_weight(layer, o, i, ky, kx);
            if (w < 0) w = -w;
            hist[w] = hist[w] + 1;
          end
    total = no * ni * k * k;
    need  = (total * 99 + 99) / 100;
    acc = 0;
    w99 = 0;
    for (int v = 0; v <= 128; v++) begin
      acc = acc + hist[v];
      if (acc >= need) begin
        w99 = v;
        break;
      end
    end
    if (w99 <= 1) return 0;
    lo = 0;
    while ((2 << lo) <= w99) lo++;
    // 2^lo <= w99 < 2^(lo+1); ties go to the smaller level.
    if ((w99 - (1 << lo)) <= ((2 << lo) - w99)) return lo;
    return lo + 1;
  endfunction

  // Width of a packed ApproxConv weight code.
  function automatic int approx_code_w(input int nl);
    return $clog2(2 * nl + 1);
  endfunction

  // Nearest power-of-two level of weight w, as a packed code (see header).
  function automatic int approx_code(input int w, input int e, input int nl);
    int mag, best, best_err, err;
    mag = (w < 0) ? -w : w;
    best = 0;
    best_err = mag;
    // Walk from the smallest level up so that ties keep the smaller level.
    for (int c = nl; c >= 1; c--) begin
      err = mag - (1 << (e - c + 1));
      if (err < 0) err = -err;
      if (err < best_err) begin
        best = c;
        best_err = err;
      end
    end
    if (best == 0) return 0;
    return (w < 0) ? best + nl : best;
  endfunction

  // Saturate an accumulator value to the int8 activation range.
  function automatic act_t sat_act(input acc_t v);
    if (v > 127) return act_t'(127);
    if (v < -128) return act_t'(-128);
    return act_t'(v);
  endfunction

endpackage
