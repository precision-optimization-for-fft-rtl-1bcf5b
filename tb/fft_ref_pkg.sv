// fft_ref_pkg: reference models for the FFT testbenches, written
// independently of the RTL.
//   - tw_ref    : twiddle factor W_N^k rounded to Q2.(TW-2), computed directly
//                 from cos/sin (the RTL uses a quarter-wave table instead)
//   - quant_ref : truncation by `drop` bits then saturation to WL bits
//   - fixed_fft : bit-accurate model of the processor's arithmetic
//                 (radix-2 DIT, full-precision butterfly, output quantization
//                 with the per-stage scaling schedule)
//   - fixed_fft4: the same for the radix-4 (mixed radix) configuration
//   - float_fft : double-precision radix-2 FFT, the noise-free reference
//   - sqnr_db   : SQNR of a fixed-point result against the float reference
package fft_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic longint rnd(input real v);
    return longint'($floor(v + 0.5));
  endfunction

  function automatic void tw_ref(input int n, input int k, input int tw,
                                 output longint wr, output longint wi);
    real sc;
    sc = real'(64'd1 << (tw - 2));
    wr = rnd($cos(2.0 * PI * real'(k) / real'(n)) * sc);
    wi = rnd(-$sin(2.0 * PI * real'(k) / real'(n)) * sc);
  endfunction

  // floor(v / 2^drop), clamped to the wl-bit two's complement range
  function automatic longint quant_ref(input longint v, input int drop, input int wl,
                                       output bit sat);
    longint q, hi, lo;
    q  = v >>> drop;
    hi = (64'sd1 <<< (wl - 1)) - 1;
    lo = -(64'sd1 <<< (wl - 1));
    sat = 1'b0;
    if (q > hi) begin q = hi; sat = 1'b1; end
    if (q < lo) begin q = lo; sat = 1'b1; end
    return q;
  endfunction

  function automatic int brev(input int v, input int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  // Bit-accurate model. re/im hold the input integers in natural order and
  // return the output integers in natural order. nsat counts saturated
  // real outputs.
  function automatic void fixed_fft(ref longint re[], ref longint im[], input int n, input int wl,
                           input int tw, input logic [31:0] sched, output int nsat);
    longint ar[], ai[];
    int s, span, p, q;
    longint wr, wi, pr, pi_, s0r, s0i, s1r, s1i;
    bit inc, st0, st1, st2, st3;
    s = $clog2(n);
    ar = new[n];
    ai = new[n];
    nsat = 0;
    for (int i = 0; i < n; i++) begin
      ar[brev(i, s)] = re[i];
      ai[brev(i, s)] = im[i];
    end
    for (int st = 0; st < s; st++) begin
      span = 1 << st;
      inc  = sched[s - 1 - st];
      for (int g = 0; g < n; g += 2 * span) begin
        for (int j = 0; j < span; j++) begin
          p = g + j;
          q = p + span;
          tw_ref(n, j * (n / (2 * span)), tw, wr, wi);
          pr  = ar[q] * wr - ai[q] * wi;
          pi_ = ar[q] * wi + ai[q] * wr;
          s0r = (ar[p] <<< (tw - 2)) + pr;
          s0i = (ai[p] <<< (tw - 2)) + pi_;
          s1r = (ar[p] <<< (tw - 2)) - pr;
          s1i = (ai[p] <<< (tw - 2)) - pi_;
          ar[p] = quant_ref(s0r, tw - 2 + int'(inc), wl, st0);
          ai[p] = quant_ref(s0i, tw - 2 + int'(inc), wl, st1);
          ar[q] = quant_ref(s1r, tw - 2 + int'(inc), wl, st2);
          ai[q] = quant_ref(s1i, tw - 2 + int'(inc), wl, st3);
          nsat += int'(st0) + int'(st1) + int'(st2) + int'(st3);
        end
      end
    end
    for (int i = 0; i < n; i++) begin
      re[i] = ar[i];
      im[i] = ai[i];
    end
  endfunction

  function automatic void cmul_ref(input longint br, input longint bi, input longint wr, input longint wi,
                                   output longint pr, output longint pi_);
    pr  = br * wr - bi * wi;
    pi_ = br * wi + bi * wr;
  endfunction

  // Bit-accurate model of the radix-4 configuration: a radix-2 first stage
  // when log2(n) is odd, then radix-4 stages on the bit-reversed data.
  // sched holds one 2-bit field per stage, first stage most significant.
  function automatic void fixed_fft4(ref longint re[], ref longint im[], input int n, input int wl,
                                     input int tw, input logic [31:0] sched, output int nsat);
    longint ar[], ai[];
    int s, ns, mix, st, sp, drop;
    longint xr[4], xi[4], yr[4], yi[4], sr[4], si[4], wr, wi;
    bit sat;
    s = $clog2(n);
    mix = s % 2;
    ns = (s + 1) / 2;
    ar = new[n];
    ai = new[n];
    nsat = 0;
    for (int i = 0; i < n; i++) begin
      ar[brev(i, s)] = re[i];
      ai[brev(i, s)] = im[i];
    end
    for (int t = 0; t < ns; t++) begin
      drop = tw - 2 + int'(sched[2 * (ns - 1 - t) +: 2]);
      if (mix == 1 && t == 0) begin
        st = 0; sp = 1;
      end else begin
        st = (mix == 1) ? 2 * t - 1 : 2 * t;
        sp = 1 << st;
      end
      for (int g = 0; g < n; g += 4 * sp) begin
        for (int pos = 0; pos < sp; pos++) begin
          for (int k = 0; k < 4; k++) begin
            xr[k] = ar[g + pos + k * sp];
            xi[k] = ai[g + pos + k * sp];
          end
          yr[0] = xr[0] <<< (tw - 2);
          yi[0] = xi[0] <<< (tw - 2);
          if (mix == 1 && t == 0) begin
            // two radix-2 butterflies with unit twiddles
            yr[2] = xr[2] <<< (tw - 2);
            yi[2] = xi[2] <<< (tw - 2);
            tw_ref(n, 0, tw, wr, wi);
            cmul_ref(xr[1], xi[1], wr, wi, yr[1], yi[1]);
            cmul_ref(xr[3], xi[3], wr, wi, yr[3], yi[3]);
            sr[0] = yr[0] + yr[1]; si[0] = yi[0] + yi[1];
            sr[1] = yr[0] - yr[1]; si[1] = yi[0] - yi[1];
            sr[2] = yr[2] + yr[3]; si[2] = yi[2] + yi[3];
            sr[3] = yr[2] - yr[3]; si[3] = yi[2] - yi[3];
          end else begin
            tw_ref(n, pos * n / (2 * sp), tw, wr, wi);
            cmul_ref(xr[1], xi[1], wr, wi, yr[1], yi[1]);
            tw_ref(n, pos * n / (4 * sp), tw, wr, wi);
            cmul_ref(xr[2], xi[2], wr, wi, yr[2], yi[2]);
            tw_ref(n, 3 * pos * n / (4 * sp), tw, wr, wi);
            cmul_ref(xr[3], xi[3], wr, wi, yr[3], yi[3]);
            // X0 = y0+y1+y2+y3, X1 = y0-y1-j(y2-y3), X2 = y0+y1-y2-y3, X3 = y0-y1+j(y2-y3)
            sr[0] = yr[0] + yr[1] + yr[2] + yr[3];  si[0] = yi[0] + yi[1] + yi[2] + yi[3];
            sr[1] = yr[0] - yr[1] + yi[2] - yi[3];  si[1] = yi[0] - yi[1] - yr[2] + yr[3];
            sr[2] = yr[0] + yr[1] - yr[2] - yr[3];  si[2] = yi[0] + yi[1] - yi[2] - yi[3];
            sr[3] = yr[0] - yr[1] - yi[2] + yi[3];  si[3] = yi[0] - yi[1] + yr[2] - yr[3];
          end
          for (int k = 0; k < 4; k++) begin
            ar[g + pos + k * sp] = quant_ref(sr[k], drop, wl, sat);
            nsat += int'(sat);
            ai[g + pos + k * sp] = quant_ref(si[k], drop, wl, sat);
            nsat += int'(sat);
          end
        end
      end
    end
    for (int i = 0; i < n; i++) begin
      re[i] = ar[i];
      im[i] = ai[i];
    end
  endfunction

  // In-place double-precision FFT, natural order in and out.
  function automatic void float_fft(ref real re[], ref real im[], input int n);
    int s, span, p, q;
    real tr, ti, wr, wi, xr, xi;
    s = $clog2(n);
    for (int i = 0; i < n; i++) begin
      int j;
      j = brev(i, s);
      if (j > i) begin
        tr = re[i]; re[i] = re[j]; re[j] = tr;
        ti = im[i]; im[i] = im[j]; im[j] = ti;
      end
    end
    for (int st = 0; st < s; st++) begin
      span = 1 << st;
      for (int g = 0; g < n; g += 2 * span) begin
        for (int j = 0; j < span; j++) begin
          p  = g + j;
          q  = p + span;
          wr = $cos(PI * real'(j) / real'(span));
          wi = -$sin(PI * real'(j) / real'(span));
          xr = re[q] * wr - im[q] * wi;
          xi = re[q] * wi + im[q] * wr;
          re[q] = re[p] - xr;
          im[q] = im[p] - xi;
          re[p] = re[p] + xr;
          im[p] = im[p] + xi;
        end
      end
    end
  endfunction

endpackage
