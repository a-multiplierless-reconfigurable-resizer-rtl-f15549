// resize_ref_pkg: reference model of the resizer for the testbenches.
//
// It computes, from closed-form sums over the input samples (not by running a
// CIC structure), the raw outputs of one 11-sample section for every
// resizing mode, the gain scale-down of the post process, and the number of
// outputs each section produces. The closed forms are:
//   decimation 1/R : y(j) = x((j-1)R+1) + ... + x(jR),          j = 0..10/R
//   decimation 2/3 : y(m) = sum of x(k) with 3m-5 <= 2k <= 3m,   m = 0..7
//   interp. 3/2    : y(3j) = x(2j-1)+x(2j), y(3j+1) = y(3j+2) = x(2j)+x(2j+1)
//   interp. R, S   : y(m) = sum_k x(k) h(m-kR), h = S-fold convolution of
//                    R ones,                                    m = 0..11R-1
// with x(k) = 0 outside the section.
package resize_ref_pkg;
  import resizer_pkg::*;

  typedef int sec_t [];
  typedef int outq_t [$];

  function automatic int xs(const ref sec_t x, input int k);
    return (k >= 0 && k < x.size()) ? x[k] : 0;
  endfunction

  // S-fold convolution of a length-R box, evaluated at n.
  function automatic int box_pow(int r, int s, int n);
    int h [$];
    int t [$];
    h = '{1};
    for (int i = 0; i < s; i++) begin
      t = {};
      for (int m = 0; m < h.size() + r - 1; m++) begin
        int acc = 0;
        for (int j = 0; j < r; j++)
          if (m - j >= 0 && m - j < h.size()) acc += h[m-j];
        t.push_back(acc);
      end
      h = t;
    end
    return (n >= 0 && n < h.size()) ? h[n] : 0;
  endfunction

  function automatic outq_t section_out(rate_e rate, int s, const ref sec_t x);
    outq_t y;
    int r;
    y = {};
    unique case (rate)
      RATE_1_2, RATE_1_3: begin
        r = (rate == RATE_1_2) ? 2 : 3;
        for (int j = 0; j <= (x.size() - 1) / r; j++) begin
          int acc = 0;
          for (int i = (j-1)*r + 1; i <= j*r; i++) acc += xs(x, i);
          y.push_back(acc);
        end
      end
      RATE_2_3: begin
        for (int m = 0; m < (2 * x.size() + 2) / 3; m++) begin
          int acc = 0;
          for (int k = -3; k < x.size() + 1; k++) if (2*k >= 3*m-5 && 2*k <= 3*m) acc += xs(x, k);
          y.push_back(acc);
        end
      end
      RATE_3_2: begin
        for (int n = 0; n < (3 * x.size()) / 2; n++) begin
          int j = n / 3;
          if (n % 3 == 0) y.push_back(xs(x, 2*j-1) + xs(x, 2*j));
          else            y.push_back(xs(x, 2*j) + xs(x, 2*j+1));
        end
      end
      default: begin
        int h [$];
        r = (rate == RATE_2) ? 2 : 3;
        for (int n = 0; n < s * (r - 1) + 1; n++) h.push_back(box_pow(r, s, n));
        for (int m = 0; m < x.size() * r; m++) begin
          int acc = 0;
          for (int k = 0; k < x.size(); k++)
            if (m - k*r >= 0 && m - k*r < h.size()) acc += x[k] * h[m - k*r];
          y.push_back(acc);
        end
      end
    endcase
    return y;
  endfunction

  // Gain of a mode: decimation 1/R: R; 2/3: 3; 3/2: 2; interpolation R: R^(S-1).
  function automatic int mode_gain(rate_e rate, int s);
    unique case (rate)
      RATE_1_3, RATE_2_3: return 3;
      RATE_1_2, RATE_3_2: return 2;
      RATE_2:  return 1 << (s - 1);
      default: return (s == 1) ? 1 : (s == 2) ? 3 : 9;
    endcase
  endfunction

  // Scale-down of the post process: exact for 1, 2, 4; 3/8 for 3; 1/8 for 9.
  function automatic int scale(int v, int g);
    int r;
    unique case (g)
      2: r = v / 2;
      4: r = v / 4;
      3: r = (v - v / 4) / 2;
      9: r = v / 8;
      default: r = v;
    endcase
    if (v < 0) r = 0;
    return (r > 255) ? 255 : r;
  endfunction

  // Stages a mode really uses, overlap and discarded outputs per section.
  function automatic int eff_stages(rate_e rate, int s);
    return (rate == RATE_2 || rate == RATE_3) ? ((s == 0) ? 1 : s) : 1;
  endfunction

  function automatic int overlap(rate_e rate, int s);
    unique case (rate)
      RATE_1_2, RATE_3_2: return 1;
      RATE_1_3, RATE_2_3: return 2;
      RATE_2:  return (s + 1) / 2;          // ceil(S/2)
      default: return (2 * s + 2) / 3;      // ceil(2S/3)
    endcase
  endfunction

  function automatic int discard(rate_e rate, int s);
    unique case (rate)
      RATE_1_2, RATE_1_3, RATE_3_2: return 1;
      RATE_2_3: return 2;
      RATE_2:  return 2 * overlap(rate, s);
      default: return 3 * overlap(rate, s);
    endcase
  endfunction

  // Numerator and denominator of a resizing rate.
  function automatic int rate_u(rate_e rate);
    unique case (rate)
      RATE_2_3, RATE_2: return 2;
      RATE_3_2, RATE_3: return 3;
      default:          return 1;
    endcase
  endfunction

  function automatic int rate_d(rate_e rate);
    unique case (rate)
      RATE_1_3, RATE_2_3: return 3;
      RATE_1_2, RATE_3_2: return 2;
      default:            return 1;
    endcase
  endfunction

  // Lane control word expected for a rate and a requested stage count.
  function automatic lane_cfg_t mk_cfg(rate_e rate, int s_req);
    lane_cfg_t c;
    int s, g;
    s = eff_stages(rate, s_req);
    g = mode_gain(rate, s);
    c = '0;
    c.interp  = (rate_u(rate) > rate_d(rate));
    c.u       = 2'(rate_u(rate));
    c.d       = 2'(rate_d(rate));
    c.kdelay  = (rate == RATE_2_3 || rate == RATE_3_2) ? 2'd2 : 2'd1;
    c.nstages = 2'(s);
    c.gain    = (g == 1) ? GAIN_1 : (g == 2) ? GAIN_2 : (g == 4) ? GAIN_4 :
                (g == 3) ? GAIN_3 : GAIN_9;
    c.overlap = 2'(overlap(rate, s));
    c.discard = 4'(discard(rate, s));
    return c;
  endfunction

  // Expected output image of one window: block-in order, 11 x 11 blocks
  // stepping by 11 - overlap, reads clamped at the right and bottom edges,
  // horizontal pass into an 11 x 33 buffer of scaled pixels, vertical pass
  // out of it. exp_px is keyed by y * 2048 + x; out_w/out_h give the size.
  function automatic void ref_frame(const ref int img [], input int w, input int h,
                                    input rate_e rh, input int sh_req,
                                    input rate_e rv, input int sv_req,
                                    ref int exp_px [int], output int out_w, output int out_h);
    int sh, sv, step_h, step_v, x0, y0, obx, oby, keep_h, keep_v, gh, gv;
    int buffer [];
    int n, dh, dv, bw, idx;
    sec_t x;
    outq_t y;
    sh = eff_stages(rh, sh_req);  sv = eff_stages(rv, sv_req);
    gh = mode_gain(rh, sh);       gv = mode_gain(rv, sv);
    step_h = int'(SEC_N) - overlap(rh, sh);
    step_v = int'(SEC_N) - overlap(rv, sv);
    exp_px.delete();
    x = new[SEC_N];
    n = x.size();
    bw = BUF_ROW;
    dh = discard(rh, sh);
    dv = discard(rv, sv);
    buffer = new[n * bw];
    y0 = 0; oby = 0; out_w = 0; out_h = 0;
    while (1) begin
      x0 = 0; obx = 0; keep_v = 0;
      while (1) begin
        keep_h = 0;
        for (int r = 0; r < n; r++) begin
          int yy = (y0 + r < h) ? y0 + r : h - 1;
          for (int k = 0; k < n; k++) begin
            int xx = (x0 + k < w) ? x0 + k : w - 1;
            x[k] = img[yy * w + xx];
          end
          y = section_out(rh, sh, x);
          keep_h = y.size() - dh;
          for (int j = 0; j < keep_h; j++) begin
            idx = r * bw + j;
            buffer[idx] = scale(y[j + dh], gh);
          end
        end
        for (int c = 0; c < keep_h; c++) begin
          for (int k = 0; k < n; k++) begin
            idx = k * bw + c;
            x[k] = buffer[idx];
          end
          y = section_out(rv, sv, x);
          keep_v = y.size() - dv;
          for (int j = 0; j < keep_v; j++)
            begin
            idx = (oby + j) * 2048 + obx + c;
            exp_px[idx] = scale(y[j + dv], gv);
          end
        end
        obx += keep_h;
        if (x0 + step_h + overlap(rh, sh) < w) x0 += step_h;
        else break;
      end
      out_w = obx;
      oby += keep_v;
      if (y0 + step_v + overlap(rv, sv) < h) y0 += step_v;
      else break;
    end
    out_h = oby;
  endfunction

endpackage
