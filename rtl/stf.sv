// Self-tuning filter (STF) on an alpha-beta pair.
//
// The STF is a complex integrator resonant at the fundamental w1 inside an
// error-correcting loop of gain K. Seen on the complex signal X = xa + j*xb
// its transfer function is K / (s + K - j*w1), i.e.
// K (s + K + j*w1) / ((s + K)^2 + w1^2): unity gain and zero phase at w1,
// and an attenuation of roughly K / |w - w1| elsewhere. In the time domain
//   dy/dt = K (x - y) + j*w1*y
// with y the fundamental estimate.
//
// This implementation discretises that equation as a correction followed by
// an exact rotation by one sample step:
//   u(k)   = y(k) + K*Ts * (x(k) - y(k))
//   y(k+1) = exp(j*w1*Ts) * u(k)
// For a pure x(k) = A*exp(j*w1*k*Ts) the fixed point is u(k) = x(k), so the
// filter keeps zero attenuation and zero phase delay at w1 after
// discretisation, not only approximately. The output is u(k), the
// corrected estimate aligned with the input sample. The discretisation is
// this design's choice.
//
// Coefficients are Q2.30 words: KTS = K*Ts, COS_WT = cos(w1*Ts),
// SIN_WT = sin(w1*Ts). The defaults are K = 50 rad/s (assumed),
// f1 = 50 Hz, Ts = 40 us (assumed), i.e. round(0.002 * 2^30),
// round(cos(pi/250) * 2^30) and round(sin(pi/250) * 2^30).
//
// Interface: a sample is accepted on a cycle with in_valid high; one clock
// later out_valid is high for one cycle with y holding the fundamental.
module stf
  import sapf_pkg::*;
#(
  parameter coef_t KTS    = 32'sd2147484,
  parameter coef_t COS_WT = 32'sd1073657046,
  parameter coef_t SIN_WT = 32'sd13492683
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  ab_t  x,
  output logic out_valid,
  output ab_t  y
);

  ab_t  st;    // y(k), the predicted estimate for the incoming sample
  ab_t  e;     // x(k) - y(k)
  ab_t  u;     // corrected estimate
  ab_t  nxt;   // y(k+1)

  always_comb begin
    e.a   = sub_sat(x.a, st.a);
    e.b   = sub_sat(x.b, st.b);
    u.a   = add_sat(st.a, mul_coef(e.a, KTS));
    u.b   = add_sat(st.b, mul_coef(e.b, KTS));
    nxt.a = sub_sat(mul_coef(u.a, COS_WT), mul_coef(u.b, SIN_WT));
    nxt.b = add_sat(mul_coef(u.a, SIN_WT), mul_coef(u.b, COS_WT));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        st <= nxt;
        y  <= u;
      end
    end
  end

endmodule
