// ha_ref_pkg: bit-exact reference model of the hearing-aid datapath for the
// testbenches, written with plain integer arithmetic (*, /, shifts) and no
// reference to the RTL's multiplier, adder or divider structure. Number
// conventions match the RTL: Q0.7 samples and coefficients, products floored
// back to Q0.7, 8-bit saturation, coefficient held in Q0.15 and clamped to
// +-127/128, division truncated toward zero.
package ha_ref_pkg;

  function automatic int sat8(input int v);
    if (v > 127)  return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  function automatic int q7(input int p);
    return p >>> 7;
  endfunction

  function automatic int fir_coef(input int k);
    int c [6] = '{2, 18, 78, -78, -18, -2};
    return c[k];
  endfunction

  function automatic int adc_to_x(input int code);
    int u;
    u = ((code >> 6) & 32'hFF) ^ 32'h80;
    return (u > 127) ? u - 256 : u;
  endfunction

  function automatic int y_to_dac(input int y);
    return (((y & 32'hFF) ^ 32'h80) << 4);
  endfunction

  // quotient of the coefficient divider: trunc(num / den), saturated
  function automatic longint div_sat(input longint num, input longint den,
                                     input longint qmax);
    longint q;
    if (den == 0) return 0;
    q = num / den;  // SystemVerilog division truncates toward zero
    if (q > qmax)  q = qmax;
    if (q < -qmax) q = -qmax;
    return q;
  endfunction

  class ha_model;
    int stages;
    int beta, gamma, eta;
    // high-pass filters
    int fir_d [6];
    int iir_x1, iir_y1;
    // decorrelator
    int     dec_bd [];
    longint sigma  [];
    int     kacc   [];
    bit     clamped [];
    // analysis / synthesis
    int ana_bd [];
    int syn_gd [];
    // loudness control
    int env_ref, env_y, gain;
    // event counters
    int n_clamp, n_sat, n_zero_sigma;

    function new(int stages_i = 8, int beta_i = 5, int gamma_i = 77, int eta_i = 251);
      stages = stages_i; beta = beta_i; gamma = gamma_i; eta = eta_i;
      dec_bd = new[stages]; sigma = new[stages]; kacc = new[stages];
      clamped = new[stages];
      ana_bd = new[stages]; syn_gd = new[stages];
      reset();
    endfunction

    function void reset();
      foreach (fir_d[i]) fir_d[i] = 0;
      iir_x1 = 0; iir_y1 = 0;
      for (int i = 0; i < stages; i++) begin
        dec_bd[i] = 0; sigma[i] = 0; kacc[i] = 0; clamped[i] = 0;
        ana_bd[i] = 0; syn_gd[i] = 0;
      end
      env_ref = 0; env_y = 0; gain = 64;
      n_clamp = 0; n_sat = 0; n_zero_sigma = 0;
    endfunction

    function int k(int i);
      return kacc[i] >>> 8;
    endfunction

    function int fir_step(int x);
      int acc;
      acc = fir_coef(0) * x;
      for (int i = 1; i < 6; i++) acc += fir_coef(i) * fir_d[i];
      for (int i = 5; i > 1; i--) fir_d[i] = fir_d[i-1];
      fir_d[1] = x;
      return sat8(acc >>> 7);
    endfunction

    function int iir_step(int x, int a = 115, int b = 122);
      int y;
      y = sat8((b * (x - iir_x1) + a * iir_y1) >>> 7);
      iir_x1 = x; iir_y1 = y;
      return y;
    endfunction

    // one gal stage; returns f_out, b_out through refs, applies the update
    function void gal_step(int i, int f_in, int b_in, output int f_out, output int b_out);
      int bd, kk;
      longint num, pwr, sn, dk, kn;
      bd = dec_bd[i]; kk = k(i);
      f_out = sat8(f_in - q7(kk * bd));
      b_out = sat8(bd - q7(kk * f_in));
      num = longint'(f_out) * bd + longint'(b_out) * f_in;
      pwr = longint'(f_in) * f_in + longint'(bd) * bd;
      sn  = ((sigma[i] * eta) >>> 8) + pwr;
      if (sn > (1 << 23) - 1) sn = (1 << 23) - 1;
      sigma[i]  = sn;
      dec_bd[i] = b_in;
      if (sn == 0) n_zero_sigma++;
      dk = div_sat(num * 32768, sn, longint'((1 << 17) - 1));
      kn = longint'(kacc[i]) + dk;
      clamped[i] = 0;
      if (kn > 32512)  begin kn = 32512;  clamped[i] = 1; n_clamp++; end
      if (kn < -32512) begin kn = -32512; clamped[i] = 1; n_clamp++; end
      kacc[i] = int'(kn);
    endfunction

    function int dec_step(int x);
      int f, b, fo, bo;
      f = x; b = x;
      for (int i = 0; i < stages; i++) begin
        gal_step(i, f, b, fo, bo);
        f = fo; b = bo;
      end
      return f;
    endfunction

    // analysis lattice with coefficients kv
    function int ana_step(int x, int kv []);
      int f, b, bs, fo, bo;
      f = x; b = x;
      for (int i = 0; i < stages; i++) begin
        bs = sat8(q7(beta * ana_bd[i]));
        fo = sat8(f - q7(kv[i] * bs));
        bo = sat8(bs - q7(kv[i] * f));
        ana_bd[i] = b;
        f = fo; b = bo;
      end
      return f;
    endfunction

    function int syn_step(int x, int kv []);
      int f [];
      int gs [];
      int gi, go;
      int v;
      f = new[stages + 1]; gs = new[stages];
      f[stages] = x;
      for (int m = stages - 1; m >= 0; m--) begin
        gs[m] = sat8(q7(gamma * syn_gd[m]));
        v = f[m+1] + q7(kv[m] * gs[m]);
        if (v > 127 || v < -128) n_sat++;
        f[m] = sat8(v);
      end
      gi = f[0];
      for (int m = 0; m < stages; m++) begin
        go = sat8(gs[m] - q7(kv[m] * f[m]));
        syn_gd[m] = gi;
        gi = go;
      end
      return f[0];
    endfunction

    function int env_next(int env, int s);
      int mag;
      mag = ((s < 0) ? -s : s) << 8;
      return env + ((mag - env) >>> 6);
    endfunction

    function void lc_ref(int x);
      env_ref = env_next(env_ref, x);
    endfunction

    function int lc_step(int y);
      int yo, en;
      longint q;
      yo = sat8((y * gain) >>> 6);
      en = env_next(env_y, y);
      env_y = en;
      if (en != 0) begin
        q = div_sat(longint'(env_ref) * 64, longint'(en), 64'd511);
        gain = (q > 255) ? 255 : int'(q);
      end
      return yo;
    endfunction

    // one complete sample through the channel, as the top processes it
    function int top_step(int code, bit noise_red);
      int x, kv [], a, s, y;
      kv = new[stages];
      for (int i = 0; i < stages; i++) kv[i] = k(i);
      x = adc_to_x(code);
      begin
        int hf, hi;
        hf = fir_step(x);
        hi = iir_step(x);
        if (!noise_red) begin
          void'(dec_step(hf));
          lc_ref(x);
          a = ana_step(x, kv);
          s = syn_step(a, kv);
          y = lc_step(s);
        end else begin
          void'(dec_step(x));
          a = ana_step(hi, kv);
          s = syn_step(a, kv);
          y = s;
        end
      end
      return y_to_dac(y);
    endfunction
  endclass

  // Synthetic speech: voiced segments (pulse train through three formant
  // resonators, vowel and pitch changing every 1000 samples), an unvoiced
  // (noise) segment and a pause in every 7000 samples. 8-bit output.
  class speech_gen;
    real s1 [2], s2 [2], s3 [2];
    int  pitch_cnt;
    real f1 [5] = '{730.0, 270.0, 530.0, 300.0, 660.0};
    real f2 [5] = '{1090.0, 2290.0, 1840.0, 870.0, 1720.0};
    real f3 [5] = '{2440.0, 3010.0, 2480.0, 2240.0, 2410.0};

    function new();
      s1 = '{0.0, 0.0}; s2 = '{0.0, 0.0}; s3 = '{0.0, 0.0};
      pitch_cnt = 0;
    endfunction

    function real rc(real f);
      return 2.0 * 0.94 * $cos(2.0 * 3.14159265 * f / 8000.0);
    endfunction

    function int next(int n);
      int seg, vow, period;
      real e, y, z, w, v, rr;
      seg = n / 1000; vow = seg % 5; rr = 0.94 * 0.94;
      period = 50 + 10 * (seg % 4);
      if (seg % 7 == 5) begin
        s1 = '{0.0, 0.0}; s2 = '{0.0, 0.0}; s3 = '{0.0, 0.0};
        return 0;
      end
      if (seg % 7 == 3) e = (real'($urandom % 2001) - 1000.0) / 1000.0;
      else begin
        e = (pitch_cnt == 0) ? 1.0 : 0.0;
        pitch_cnt = (pitch_cnt + 1) % period;
      end
      y = e + rc(f1[vow]) * s1[0] - rr * s1[1]; s1[1] = s1[0]; s1[0] = y;
      z = y + rc(f2[vow]) * s2[0] - rr * s2[1]; s2[1] = s2[0]; s2[0] = z;
      w = z + rc(f3[vow]) * s3[0] - rr * s3[1]; s3[1] = s3[0]; s3[0] = w;
      v = (seg % 7 == 3) ? w * 6.0 : w * 1.5;
      if (v > 127.0) v = 127.0;
      if (v < -128.0) v = -128.0;
      return int'(v);
    endfunction
  endclass

endpackage
