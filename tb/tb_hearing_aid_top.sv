// tb_hearing_aid_top: end-to-end test of the hearing-aid channel at its
// default size (8 stages, beta = 5/128, gamma = 77/128, eta = 251/256).
// A synthetic speech signal is generated here: voiced segments (a pulse train
// with changing pitch through two or three resonators whose formant
// frequencies move between vowels), unvoiced noise segments, pauses, and a
// loud segment. The channel runs NSAMP samples, 40000 by default (5 s at
// 8 kS/s), switching between the speech-enhancement and noise-reduction
// arrangements every 3000 samples. Samples are offered as soon as ready is
// high. Every DAC code is compared with the bit-exact reference model, and
// the test checks the 5-clock input-to-output latency and the sample period
// (37 clocks in speech enhancement, 36 in noise reduction).
// Mechanisms that must occur at least once: a mode switch in each direction,
// a sample offered while ready was low (stall), a coefficient clamp, a
// zero-power (silent) coefficient update, synthesis-path saturation, and
// loudness gain below and above 1.
module tb_hearing_aid_top;
  import ha_pkg::*;
  import ha_ref_pkg::*;

  localparam int M     = 8;
  localparam int NSAMP = 40000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  ha_mode_e mode;
  logic adc_valid = 0, ready, dac_valid;
  logic [13:0] adc_code;
  logic [11:0] dac_code;
  logic signed [M-1:0][7:0] k_coef;

  hearing_aid_top dut (.clk, .rst_n, .mode, .adc_valid, .adc_code, .ready,
                       .dac_valid, .dac_code, .k_coef);
  always #5 clk = ~clk;

  ha_model m;
  int n_switch_se = 0, n_switch_nr = 0, n_stall = 0, n_clamp = 0;
  int n_gain_lo = 0, n_gain_hi = 0;
  real sum_in2 = 0, sum_out2 = 0;

  initial begin
    repeat (60 * NSAMP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- synthetic speech source ----
  real r1s [2], r2s [2], r3s [2];
  real f1 [5] = '{730.0, 270.0, 530.0, 300.0, 660.0};
  real f2 [5] = '{1090.0, 2290.0, 1840.0, 870.0, 1720.0};
  real f3 [5] = '{2440.0, 3010.0, 2480.0, 2240.0, 2410.0};
  real c1, c2, c3, rr;
  int  pitch_cnt;

  function automatic real res_coef(real f);
    return 2.0 * 0.94 * $cos(2.0 * 3.14159265 * f / 8000.0);
  endfunction

  function automatic int speech(int n);
    int seg, vow, period;
    real e, y, z, w, v;
    seg = n / 1000;
    vow = seg % 5;
    c1 = res_coef(f1[vow]); c2 = res_coef(f2[vow]); c3 = res_coef(f3[vow]);
    rr = 0.94 * 0.94;
    period = 50 + 10 * (seg % 4);
    if (seg % 7 == 5) begin                       // pause: digital silence
      pitch_cnt = 0;
      r1s = '{0.0, 0.0}; r2s = '{0.0, 0.0}; r3s = '{0.0, 0.0};
      return 0;
    end
    if (seg % 7 == 6 && (n % 1000) > 600)          // very quiet onset
      return ((n % 2) != 0) ? 1 : 0;
    if (seg % 7 == 3) begin                        // unvoiced: noise
      e = (real'($urandom % 2001) - 1000.0) / 1000.0;
    end else begin
      e = (pitch_cnt == 0) ? 1.0 : 0.0;
      pitch_cnt = (pitch_cnt + 1) % period;
    end
    y = e + c1 * r1s[0] - rr * r1s[1]; r1s[1] = r1s[0]; r1s[0] = y;
    z = y + c2 * r2s[0] - rr * r2s[1]; r2s[1] = r2s[0]; r2s[0] = z;
    w = z + c3 * r3s[0] - rr * r3s[1]; r3s[1] = r3s[0]; r3s[0] = w;
    v = (seg % 7 == 3) ? w * 6.0 : w * ((seg % 7 == 1) ? 6.0 : 1.5);
    if (v > 127.0) v = 127.0;
    if (v < -128.0) v = -128.0;
    return int'(v);
  endfunction

  initial begin
    int x, want, lat, period, code;
    int last_t, t;
    bit nr, prev_nr;
    m = new(M);
    mode = MODE_SPEECH_ENH;
    adc_code = 14'h2000;
    pitch_cnt = 0;
    r1s = '{0.0, 0.0}; r2s = '{0.0, 0.0}; r3s = '{0.0, 0.0};
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    prev_nr = 0;
    t = 0; last_t = -1;
    for (int n = 0; n < NSAMP; n++) begin
      nr = ((n / 3000) % 2) == 1;
      if (nr && !prev_nr) n_switch_nr++;
      if (!nr && prev_nr) n_switch_se++;
      prev_nr = nr;
      x = speech(n);
      code = ((x + 128) << 6) | int'($urandom % 64);
      // wait for ready; count samples that had to wait
      if (!ready) n_stall++;
      while (!ready) begin @(negedge clk); t++; end
      if (last_t >= 0) begin
        period = t - last_t;
        checks++;
        if (period != (prev_nr_period(nr) )) begin
          failures++;
          if (failures < 10) $display("FAIL sample period %0d at n=%0d", period, n);
        end
      end
      last_t = t;
      mode = nr ? MODE_NOISE_RED : MODE_SPEECH_ENH;
      adc_valid = 1; adc_code = 14'(code);
      want = m.top_step(code, nr);
      if (!nr) begin
        if (m.gain < 64) n_gain_lo++;
        if (m.gain > 64) n_gain_hi++;
      end
      @(negedge clk); t++;
      adc_valid = 0;
      lat = 1;
      while (!dac_valid) begin @(negedge clk); t++; lat++; end
      checks += 2;
      if (lat != 5) begin failures++; if (failures < 10) $display("FAIL latency %0d", lat); end
      if (dac_code !== 12'(want)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d dac=%0d want %0d", n, dac_code, want);
      end
      sum_in2  += real'(x) * real'(x);
      sum_out2 += real'((int'(dac_code) - 2048) / 16) * real'((int'(dac_code) - 2048) / 16);
      if (dut.clamp_seen) n_clamp++;
      mode_prev_for_period = nr;
    end
    // drain the last update
    while (!ready) @(negedge clk);
    for (int i = 0; i < M; i++) begin
      checks++;
      if (k_coef[i] !== 8'(m.k(i))) begin failures++; $display("FAIL final k[%0d]", i); end
    end
    $display("events: switch->NR %0d, switch->SE %0d, stalls %0d, clamps %0d (model %0d), silent updates %0d, saturations %0d, gain<1 %0d, gain>1 %0d",
             n_switch_nr, n_switch_se, n_stall, n_clamp, m.n_clamp, m.n_zero_sigma, m.n_sat, n_gain_lo, n_gain_hi);
    $display("rms gain out/in = %f", $sqrt(sum_out2 / sum_in2));
    if (n_switch_nr == 0) begin failures++; $display("FAIL no switch to noise reduction"); end
    if (n_switch_se == 0) begin failures++; $display("FAIL no switch to speech enhancement"); end
    if (n_stall == 0)     begin failures++; $display("FAIL ready never stalled a sample"); end
    if (n_clamp == 0)     begin failures++; $display("FAIL no coefficient clamp"); end
    if (m.n_zero_sigma == 0) begin failures++; $display("FAIL no silent update"); end
    if (m.n_sat == 0)     begin failures++; $display("FAIL synthesis never saturated"); end
    if (n_gain_lo == 0)   begin failures++; $display("FAIL loudness gain never below 1"); end
    if (n_gain_hi == 0)   begin failures++; $display("FAIL loudness gain never above 1"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample period expected between the previous sample and this one: it is
  // set by the arrangement the previous sample used
  bit mode_prev_for_period = 0;
  function automatic int prev_nr_period(bit unused);
    return mode_prev_for_period ? 36 : 37;
  endfunction
endmodule
