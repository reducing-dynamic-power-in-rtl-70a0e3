// tb_ref_pkg: behavioural reference of one streaming CONV-ReLU-MAX layer,
// with or without ReLU prediction, written independently of the RTL
// structure. It works on whole frames held in arrays. The prediction levels
// are derived here on their own: sort the layer's weight magnitudes, take
// the 99th percentile, round it to the nearest power of two 2^E, and map
// each weight to the nearest of 0, +-2^E .. +-2^(E-NL+1) (ties to the
// smaller magnitude). Only the stand-in weight set is shared with the RTL.
package tb_ref_pkg;
  import cnn_pkg::*;

  typedef struct {
    int windows;     // windows computed
    int noops;       // CONV evaluations skipped by prediction
    int false_pos;   // predicted positive, exact result <= 0 (ReLU clears it)
    int missed;      // predicted non-positive, exact result > 0 (lost)
    int true_neg;    // predicted non-positive and exact result <= 0
  } stats_t;

  function automatic int ref_w99_exp(input int layer, input int no, input int ni, input int k);
    int mags[$];
    int idx, v, e;
    for (int o = 0; o < no; o++)
      for (int i = 0; i < ni; i++)
        for (int y = 0; y < k; y++)
          for (int x = 0; x < k; x++) begin
            int w;
            w = conv_weight(layer, o, i, y, x);
            mags.push_back(w < 0 ? -w : w);
          end
    mags.sort();
    idx = (mags.size() * 99 + 99) / 100 - 1;
    v = mags[idx];
    e = 0;
    // nearest power of two, ties to the smaller one
    for (int t = 1; t < 8; t++)
      if (((1 << t) - v > 0 ? (1 << t) - v : v - (1 << t)) <
          ((1 << e) - v > 0 ? (1 << e) - v : v - (1 << e))) e = t;
    return e;
  endfunction

  function automatic int ref_level(input int w, input int e, input int nl);
    int m, best, besterr;
    m = w < 0 ? -w : w;
    best = 0;
    besterr = m;
    for (int k = nl - 1; k >= 0; k--) begin
      int l, err;
      l = 1 << (e - k);
      err = m > l ? m - l : l - m;
      if (err < besterr) begin
        best = l;
        besterr = err;
      end
    end
    return w < 0 ? -best : best;
  endfunction

  // img: [H][W][NI] flattened as (r*W + c)*NI + i; result likewise with NO maps.
  function automatic void layer_ref(input int img[], input int ni, input int no, input int kc,
                                    input int w, input int h, input int kp, input int sp,
                                    input int layer, input int shift, input bit approx,
                                    input int nl, output int res[], inout stats_t st);
    int wc, hc, wo, ho, e;
    int conv[];
    wc = w - kc + 1;
    hc = h - kc + 1;
    wo = (wc - kp) / sp + 1;
    ho = (hc - kp) / sp + 1;
    e = approx ? ref_w99_exp(layer, no, ni, kc) : 0;
    conv = new[wc * hc * no];
    for (int r = 0; r < hc; r++)
      for (int c = 0; c < wc; c++) begin
        st.windows++;
        for (int o = 0; o < no; o++) begin
          longint s, a;
          int q;
          s = longint'(conv_bias(layer, o));
          a = s;
          for (int y = 0; y < kc; y++)
            for (int x = 0; x < kc; x++)
              for (int i = 0; i < ni; i++) begin
                int p, wt;
                p = img[((r + y) * w + (c + x)) * ni + i];
                wt = conv_weight(layer, o, i, y, x);
                s += longint'(wt) * p;
                if (approx) a += longint'(ref_level(wt, e, nl)) * p;
              end
          s = s >>> shift;
          q = s > 127 ? 127 : (s < -128 ? -128 : int'(s));
          if (approx && a <= 0) begin
            st.noops++;
            if (q > 0) st.missed++;
            else st.true_neg++;
            q = 0;
          end else if (approx && q <= 0) begin
            st.false_pos++;
          end
          conv[(r * wc + c) * no + o] = q > 0 ? q : 0;
        end
      end
    res = new[wo * ho * no];
    for (int r = 0; r < ho; r++)
      for (int c = 0; c < wo; c++)
        for (int o = 0; o < no; o++) begin
          int m;
          m = -1000;
          for (int y = 0; y < kp; y++)
            for (int x = 0; x < kp; x++)
              if (conv[((r * sp + y) * wc + (c * sp + x)) * no + o] > m)
                m = conv[((r * sp + y) * wc + (c * sp + x)) * no + o];
          res[(r * wo + c) * no + o] = m;
        end
  endfunction

endpackage
