// Closed-loop DC-link test of the SAPF controller at its default
// parameters. Same plant as the end-to-end testbench (one clock = 0.4 us,
// 25 kHz controller samples, 30 Vrms source, 27 % THD load, 5 mH inductor),
// but the DC-link voltage is now a state of the plant: a 2.35 mF capacitor
// (two 4.7 mF in series, assumed) with a 300 ohm loss resistor, charged or
// discharged by the inverter current, C dudc/dt = -(+/-ic) - udc/R, sign by
// the conducting diagonal. The link starts precharged to 52 V.
//
// Scenario: ideal source; at 0.6 s the load drops by 50 %; at 0.9 s it
// doubles again and the source carries 7 % fifth and 3.87 % seventh
// harmonic; the run ends at 1.3 s.
//
// Checks: the DC link reaches and holds 60 V (+/-1.5 V, mean over a cycle
// within 0.5 V) before each event and again 0.1 s after it, the source-current
// THD stays under 5 %, and the PI controller is seen both charging (u > 0)
// and discharging (u < 0).
module sapf_dclink_tb;
  import sapf_pkg::*;
  import tb_util_pkg::*;

  localparam real TS    = 4.0e-5;            // controller sample period
  localparam real DT    = 4.0e-7;            // one clock of plant time
  localparam int  SPC   = 100;               // clocks per sample
  localparam real W1    = 2.0 * PI_R * 50.0;
  localparam real VPK   = 30.0 * 1.41421356;
  localparam real LC    = 5.0e-3;
  localparam real CDC   = 2.35e-3;
  localparam real RLOSS = 300.0;
  localparam int  NSMP  = 32500;             // 1.3 s
  localparam int  NPER  = 500;               // samples per fundamental period

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

  int checks = 0, failures = 0, n_pi_pos = 0, n_pi_neg = 0;

  real is_r [NSMP];
  real ud_s [NSMP];

  function automatic real load_scale(input real t);
    return (t >= 0.6 && t < 0.9) ? 2.5 : 5.0;
  endfunction

  function automatic real src(input real t);
    real v;
    v = VPK * $sin(W1 * t);
    if (t >= 0.9) v += 0.07 * VPK * $sin(5.0 * W1 * t) + 0.0387 * VPK * $sin(7.0 * W1 * t);
    return v;
  endfunction

  function automatic real load(input real t);
    real th;
    th = W1 * t - 0.3;
    return load_scale(t) * ($sin(th) + 0.15 * $sin(3.0 * th) + 0.2 * $sin(5.0 * th)
                            + 0.1 * $sin(7.0 * th));
  endfunction

  function automatic real thd(input int n_end);
    real a, b, f1, hs;
    hs = 0.0; f1 = 0.0;
    for (int h = 1; h <= 40; h++) begin
      a = 0.0; b = 0.0;
      for (int k = n_end - NPER + 1; k <= n_end; k++) begin
        a += is_r[k] * $cos(h * W1 * k * TS);
        b += is_r[k] * $sin(h * W1 * k * TS);
      end
      if (h == 1) f1 = a * a + b * b;
      else        hs += a * a + b * b;
    end
    return $sqrt(hs / f1);
  endfunction

  // Mean and extremes of the DC link over the period ending at sample n_end.
  task automatic check_link(input string what, input int n_end);
    real mean, lo, hi;
    mean = 0.0; lo = 1.0e9; hi = -1.0e9;
    for (int k = n_end - NPER + 1; k <= n_end; k++) begin
      mean += ud_s[k] / NPER;
      if (ud_s[k] < lo) lo = ud_s[k];
      if (ud_s[k] > hi) hi = ud_s[k];
    end
    $display("%s: udc mean %.3f V, min %.3f V, max %.3f V, source THD %.2f %%",
             what, mean, lo, hi, thd(n_end) * 100.0);
    checks++;
    if (rabs(mean - 60.0) > 0.5 || lo < 58.5 || hi > 61.5) begin
      failures++;
      $display("  DC link not regulated");
    end
    checks++;
    if (thd(n_end) > 0.05) begin failures++; $display("  source THD above 5 %%"); end
  endtask

  initial begin
    repeat (SPC * NSMP + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Plant: one step per clock.
  real ic_r = 0.0, ud_r = 52.0;
  int  clk_n = 0, smp = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      real t, vinv, vs, idc;
      t     = clk_n * DT;
      vs    = src(t);
      vinv  = pulse1 ? ud_r : pulse2 ? -ud_r : 0.0;
      idc   = pulse1 ? ic_r : pulse2 ? -ic_r : 0.0;
      ic_r  = ic_r + (vinv - vs) * DT / LC;
      ud_r  = ud_r - (idc + ud_r / RLOSS) * DT / CDC;
      ic       <= r2f(ic_r);
      ic_valid <= 1'b1;
      if (clk_n % SPC == 0 && smp < NSMP) begin
        is_r[smp] = load(t) - ic_r;
        ud_s[smp] = ud_r;
        us  <= r2f(vs);
        il  <= r2f(load(t));
        udc <= r2f(ud_r);
        sample_valid <= 1'b1;
        smp++;
      end else begin
        sample_valid <= 1'b0;
      end
      clk_n++;
    end
  end

  always @(posedge clk) begin
    if (rst_n && i_ref_valid) begin
      if (pi_out > 0) n_pi_pos++;
      if (pi_out < 0) n_pi_neg++;
    end
  end

  initial begin
    vref <= r2f(60.0);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (smp == NSMP);
    repeat (SPC) @(posedge clk);
    check_link("before the load decrease (0.6 s)", 15000 - 1);
    check_link("0.1 s after the load decrease   ", 17500 - 1);
    check_link("0.2 s after the load decrease   ", 20000 - 1);
    check_link("before the load increase (0.9 s)", 22500 - 1);
    check_link("0.1 s after load increase and distorted source", 25000 - 1);
    check_link("0.4 s after load increase and distorted source", NSMP - 1);
    $display("PI output samples: positive %0d, negative %0d", n_pi_pos, n_pi_neg);
    checks++; if (n_pi_pos == 0) failures++;
    checks++; if (n_pi_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
