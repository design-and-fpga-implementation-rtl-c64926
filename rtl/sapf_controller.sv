// Dual self-tuning-filter pq controller for a single-phase shunt active
// power filter (SAPF).
//
// The controller senses the source voltage us, the load current il, the
// DC-link voltage udc and the inverter (compensation) current ic, and
// produces the gate pulses of the four-switch inverter so that the inverter
// supplies the load's harmonic and reactive current and keeps the DC link
// at its reference.
//
// Signal flow per sample (all samples Q16.16):
//   1. quarter_delay x2 : us and il become alpha-beta pairs, beta being the
//                         signal delayed by a quarter of the fundamental.
//   2. stf x2           : fundamental voltage V' and fundamental load
//                         current I' with zero phase delay.
//   3. Ih = I - I'      : harmonic load current.
//   4. pq_calc          : p = V'.Ih (active), q = Va'Ib - Vb'Ia (reactive).
//   5. pi_controller    : u from vref - udc; p is replaced by p - u.
//   6. ref_current_calc : Ia_ref, Ib_ref; the alpha one is the reference
//                         of the real single-phase compensation current.
//   7. hysteresis_ctrl  : err = ic - Ia_ref compared with the band, on every
//                         ic_valid, which may come much faster than the
//                         controller samples.
// This chain is the one the published controller block diagram draws; the
// word formats, sample rate, gains and band are this design's assumptions
// (see the blocks' headers).
//
// Timing: a controller sample (sample_valid) needs 2 clocks to reach the
// STF outputs, 1 more for p and q and 82 more for the reference
// current, which then holds until the next result. sample_valid must be at
// least 90 clocks apart; at the assumed 25 kHz sample rate any clock above
// 2.25 MHz works.
module sapf_controller
  import sapf_pkg::*;
#(
  parameter int    DELAY_DEPTH = 125,             // Fs / (4 f1)
  parameter coef_t STF_KTS     = 32'sd2147484,    // K*Ts,  K = 50 rad/s
  parameter coef_t STF_COS     = 32'sd1073657046, // cos(w1*Ts)
  parameter coef_t STF_SIN     = 32'sd13492683,   // sin(w1*Ts)
  parameter fix_t  PI_KP       = 32'sd1310720,    // 20
  parameter coef_t PI_KITS     = 32'sd42949673,   // Ki*Ts, Ki = 1000
  parameter fix_t  PI_UMAX     = 32'sd131072000,  // 2000
  parameter fix_t  HB          = 32'sd13107       // 0.2 A
) (
  input  logic       clk,
  input  logic       rst_n,
  // controller sample
  input  logic       sample_valid,
  input  fix_t       us,          // source voltage
  input  fix_t       il,          // load current
  input  fix_t       udc,         // DC-link voltage
  input  fix_t       vref,        // DC-link reference (60 V in the published design)
  // compensation current sample for the hysteresis loop
  input  logic       ic_valid,
  input  fix_t       ic,
  // gate pulses
  output logic       pulse1,      // S1 and S4
  output logic       pulse2,      // S2 and S3
  output logic [3:0] gate,        // {S4, S3, S2, S1}
  // internal quantities, for observation
  output ab_t        v_fund,      // V'
  output ab_t        i_fund,      // I'
  output fix_t       p_out,
  output fix_t       q_out,
  output fix_t       pi_out,
  output logic       pi_sat,
  output ab_t        i_ref,
  output logic       i_ref_valid,
  output logic       den_zero
);

  ab_t  us_ab, il_ab, il_ab_d, ih;
  logic us_ab_v, il_ab_v, i_fund_v, pq_v;
  fix_t p_adj;

  quarter_delay #(.DEPTH(DELAY_DEPTH)) u_delay_v (
    .clk, .rst_n, .in_valid(sample_valid), .x(us), .out_valid(us_ab_v), .y(us_ab)
  );

  quarter_delay #(.DEPTH(DELAY_DEPTH)) u_delay_i (
    .clk, .rst_n, .in_valid(sample_valid), .x(il), .out_valid(il_ab_v), .y(il_ab)
  );

  stf #(.KTS(STF_KTS), .COS_WT(STF_COS), .SIN_WT(STF_SIN)) u_stf_v (
    .clk, .rst_n, .in_valid(us_ab_v), .x(us_ab), .out_valid(), .y(v_fund)
  );

  stf #(.KTS(STF_KTS), .COS_WT(STF_COS), .SIN_WT(STF_SIN)) u_stf_i (
    .clk, .rst_n, .in_valid(il_ab_v), .x(il_ab), .out_valid(i_fund_v), .y(i_fund)
  );

  // Keep the load current aligned with the STF output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       il_ab_d <= '0;
    else if (il_ab_v) il_ab_d <= il_ab;
  end

  always_comb begin
    ih.a = sub_sat(il_ab_d.a, i_fund.a);
    ih.b = sub_sat(il_ab_d.b, i_fund.b);
  end

  pq_calc u_pq (
    .clk, .rst_n, .in_valid(i_fund_v), .v1(v_fund), .ih, .il(il_ab_d),
    .out_valid(pq_v), .p(p_out), .q(q_out)
  );

  pi_controller #(.KP(PI_KP), .KITS(PI_KITS), .UMAX(PI_UMAX)) u_pi (
    .clk, .rst_n, .in_valid(sample_valid), .udc, .vref,
    .out_valid(), .u(pi_out), .sat(pi_sat)
  );

  assign p_adj = sub_sat(p_out, pi_out);

  ref_current_calc u_ref (
    .clk, .rst_n, .in_valid(pq_v), .v1(v_fund), .p(p_adj), .q(q_out),
    .busy(), .out_valid(i_ref_valid), .i_ref, .den_zero
  );

  hysteresis_ctrl #(.HB(HB)) u_hyst (
    .clk, .rst_n, .en(ic_valid), .err(sub_sat(ic, i_ref.a)),
    .pulse1, .pulse2, .gate
  );

endmodule
