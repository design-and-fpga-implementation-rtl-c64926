// End-to-end testbench of the SAPF controller at its default parameters,
// closed around a floating-point model of the power circuit.
//
// One clock stands for 0.4 us of plant time; the controller samples every
// 100 clocks (25 kHz) and the hysteresis loop compares on every clock. The
// plant: a 30 Vrms 50 Hz source, a non-linear load drawing a 5 A lagging
// fundamental with 15 % third, 20 % fifth and 10 % seventh harmonic (27 %
// THD), and an inverter leg pair driving the compensation current through a
// 5 mH inductor from a prescribed DC-link voltage: di/dt = (v_inv - us)/L,
// v_inv = +udc with S1, S4 on, -udc with S2, S3 on. The source current is
// is = il - ic.
//
// Scenario: 0 to 0.3 s ideal source; at 0.3 s the load drops by 50 %; the
// DC link dips to 57 V (0.32 to 0.36 s) and rises to 63 V (0.38 to 0.42 s)
// against its 60 V reference; at 0.5 s the load doubles again and the
// source carries 7 % fifth and 3.87 % seventh harmonic.
//
// Checks:
//  - every reference current against a floating-point model of the whole
//    chain (quarter delays, STFs, pq, PI, reference equations);
//  - the STF outputs against the true fundamentals of us and il;
//  - the compensation current staying near its reference;
//  - the source-current THD below 5 % at the end of each phase;
//  - that every mechanism occurred: start-up with zero voltage estimate,
//    both switching transitions, holding inside the band, the load steps,
//    the distorted source, and a PI output of each sign.
module sapf_controller_tb;
  import sapf_pkg::*;
  import tb_util_pkg::*;

  localparam real TS    = 4.0e-5;            // controller sample period
  localparam real DT    = 4.0e-7;            // one clock of plant time
  localparam int  SPC   = 100;               // clocks per sample
  localparam real W1    = 2.0 * PI_R * 50.0;
  localparam real VPK   = 30.0 * 1.41421356;
  localparam real LC    = 5.0e-3;
  localparam real T_END = 0.8;
  localparam int  NSMP  = 20000;

  logic       clk = 0, rst_n = 0, sample_valid = 0, ic_valid = 0;
  fix_t       us = '0, il = '0, udc = '0, vref = '0, ic = '0;
  logic       pulse1, pulse2, pi_sat, i_ref_valid, den_zero;
  logic [3:0] gate;
  ab_t        v_fund, i_fund, i_ref;
  fix_t       p_out, q_out, pi_out;

  sapf_controller dut (
    .clk, .rst_n, .sample_valid, .us, .il, .udc, .vref, .ic_valid, .ic,
    .pulse1, .pulse2, .gate, .v_fund, .i_fund, .p_out, .q_out, .pi_out, .pi_sat,
    .i_ref, .i_ref_valid, .den_zero
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_den_zero = 0, n_on14 = 0, n_on23 = 0, n_hold = 0, n_load_step = 0,
      n_distorted = 0, n_pi_pos = 0, n_pi_neg = 0, n_track_bad = 0, n_track = 0;

  real us_r [NSMP];
  real il_r [NSMP];
  real is_r [NSMP];
  real ud_r;

  function automatic real load_scale(input real t);
    return (t >= 0.3 && t < 0.5) ? 2.5 : 5.0;
  endfunction

  function automatic real src(input real t);
    real v;
    v = VPK * $sin(W1 * t);
    if (t >= 0.5) v += 0.07 * VPK * $sin(5.0 * W1 * t) + 0.0387 * VPK * $sin(7.0 * W1 * t);
    return v;
  endfunction

  function automatic real load(input real t);
    real th;
    th = W1 * t - 0.3;
    return load_scale(t) * ($sin(th) + 0.15 * $sin(3.0 * th) + 0.2 * $sin(5.0 * th)
                            + 0.1 * $sin(7.0 * th));
  endfunction

  function automatic real dclink(input real t);
    if (t >= 0.32 && t < 0.36) return 57.0;
    if (t >= 0.38 && t < 0.42) return 63.0;
    return 60.0;
  endfunction

  // THD of one fundamental period (500 samples) of is ending at sample n.
  function automatic real thd(input int n_end);
    real a, b, f1, hs;
    hs = 0.0; f1 = 0.0;
    for (int h = 1; h <= 40; h++) begin
      a = 0.0; b = 0.0;
      for (int k = n_end - 499; k <= n_end; k++) begin
        a += is_r[k] * $cos(h * W1 * k * TS);
        b += is_r[k] * $sin(h * W1 * k * TS);
      end
      if (h == 1) f1 = a * a + b * b;
      else        hs += a * a + b * b;
    end
    return $sqrt(hs / f1);
  endfunction

  initial begin
    repeat (SPC * NSMP + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Plant and stimulus: one step per clock.
  real ic_r = 0.0;
  int  clk_n = 0;
  real t_now = 0.0;
  int  smp = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      real vinv, vs;
      t_now = clk_n * DT;
      vs    = src(t_now);
      vinv  = pulse1 ? dclink(t_now) : pulse2 ? -dclink(t_now) : 0.0;
      ic_r  = ic_r + (vinv - vs) * DT / LC;
      ic       <= r2f(ic_r);
      ic_valid <= 1'b1;
      if (clk_n % SPC == 0 && smp < NSMP) begin
        us_r[smp] = f2r(r2f(vs));
        il_r[smp] = f2r(r2f(load(t_now)));
        is_r[smp] = load(t_now) - ic_r;
        ud_r      = dclink(t_now);
        us  <= r2f(vs);
        il  <= r2f(load(t_now));
        udc <= r2f(ud_r);
        sample_valid <= 1'b1;
        smp++;
      end else begin
        sample_valid <= 1'b0;
      end
      clk_n++;
    end
  end

  // Reference model and checks, one step per reference-current result.
  int res_n = 0;
  logic p1_q = 0, p2_q = 0;
  stf_model mv, mi;
  pi_model  mp;
  real max_ref_err = 0.0;
  initial begin
    mv = new(50.0, W1, TS);
    mi = new(50.0, W1, TS);
    mp = new(20.0, c2r(32'sd42949673), 2000.0);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // switching transitions and band holds
      if (pulse1 && !p1_q) n_on14++;
      if (pulse2 && !p2_q) n_on23++;
      if ((pulse1 || pulse2) && pulse1 == p1_q && pulse2 == p2_q) n_hold++;
      p1_q <= pulse1;
      p2_q <= pulse2;
      if (clk_n > 250000) begin
        n_track++;
        if (rabs(f2r(ic) - f2r(i_ref.a)) > 0.3) n_track_bad++;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && i_ref_valid) begin
      int  n;
      real va, vb, ia, ib, iha, ihb, p, q, d, exp_a, t, e1, e2;
      n  = res_n;
      va = us_r[n]; vb = (n >= 125) ? us_r[n-125] : 0.0;
      ia = il_r[n]; ib = (n >= 125) ? il_r[n-125] : 0.0;
      mv.step(va, vb);
      mi.step(ia, ib);
      mp.step(f2r(r2f(dclink(n * TS))), 60.0);
      iha = ia - mi.oa; ihb = ib - mi.ob;
      p = mv.oa * iha + mv.ob * ihb;
      q = mv.oa * ib - mv.ob * ia;
      p = p - mp.u;
      d = mv.oa * mv.oa + mv.ob * mv.ob;
      exp_a = (d > 0.0) ? (mv.oa * p - mv.ob * q) / d : 0.0;
      if (den_zero) n_den_zero++;
      if (pi_out > 0) n_pi_pos++;
      if (pi_out < 0) n_pi_neg++;
      t = n * TS;
      if (n >= 1250) begin
        e1 = rabs(f2r(i_ref.a) - exp_a);
        if (e1 > max_ref_err) max_ref_err = e1;
        checks++;
        if (e1 > 0.02) begin
          failures++;
          if (failures < 20) $display("n=%0d iref=%f model=%f", n, f2r(i_ref.a), exp_a);
        end
      end
      // fundamentals, away from the transients
      if ((t > 0.2 && t < 0.3) || (t > 0.45 && t < 0.5) || (t > 0.7)) begin
        e1 = rabs(f2r(v_fund.a) - VPK * $sin(W1 * t));
        e2 = rabs(f2r(i_fund.a) - load_scale(t) * $sin(W1 * t - 0.3));
        checks++;
        if (e1 > 0.03 * VPK || e2 > 0.05 * load_scale(t)) begin
          failures++;
          if (failures < 20)
            $display("n=%0d fundamental v %f/%f i %f/%f", n, f2r(v_fund.a), VPK * $sin(W1 * t),
                     f2r(i_fund.a), load_scale(t) * $sin(W1 * t - 0.3));
        end
      end
      if (n == 7500) n_load_step++;
      if (n == 12500) begin n_load_step++; n_distorted++; end
      res_n++;
    end
  end

  initial begin
    real th;
    vref <= r2f(60.0);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (smp == NSMP);
    repeat (SPC) @(posedge clk);
    th = thd(7499);
    $display("source current THD: ideal %.2f %%", th * 100.0);
    checks++; if (th > 0.05) failures++;
    th = thd(12499);
    $display("source current THD: half load %.2f %%", th * 100.0);
    checks++; if (th > 0.05) failures++;
    th = thd(NSMP - 1);
    $display("source current THD: distorted source %.2f %%", th * 100.0);
    checks++; if (th > 0.05) failures++;
    checks++;
    if (n_track_bad * 100 > n_track) begin
      failures++;
      $display("compensation current off its reference in %0d of %0d clocks", n_track_bad, n_track);
    end
    $display("max |iref - model| %f A", max_ref_err);
    $display("mechanisms: den_zero %0d, S1S4 on %0d, S2S3 on %0d, holds %0d, load steps %0d, distorted %0d, pi>0 %0d, pi<0 %0d",
             n_den_zero, n_on14, n_on23, n_hold, n_load_step, n_distorted, n_pi_pos, n_pi_neg);
    checks++; if (n_den_zero == 0) failures++;
    checks++; if (n_on14 == 0) failures++;
    checks++; if (n_on23 == 0) failures++;
    checks++; if (n_hold == 0) failures++;
    checks++; if (n_load_step != 2) failures++;
    checks++; if (n_distorted == 0) failures++;
    checks++; if (n_pi_pos == 0) failures++;
    checks++; if (n_pi_neg == 0) failures++;
    checks++; if (res_n < NSMP - 1) begin failures++; $display("results %0d", res_n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
