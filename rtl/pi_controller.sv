// DC-link voltage PI controller, u = Kp*e + Ki * integral(e).
//
// The error is the DC-link reference less the measured voltage,
// e = vref - udc. The controller output is subtracted from p, and the
// reference current equations make the inverter draw an in-phase current
// (active power) when the resulting p is negative; so a DC link below its
// reference gives a positive u, which charges the capacitor. The integral
// is the running sum of Ki*Ts*e, kept in a wide accumulator with 46
// fraction bits so that small errors are not lost; it is clamped to
// +/-UMAX, and so is the output (the limit is this design's choice, needed
// by the finite word).
//
// Parameters: KP in Q16.16, KITS = Ki*Ts in Q2.30, UMAX in Q16.16. The
// defaults, Kp = 20, Ki = 1000 (Ts = 40 us) and UMAX = 2000, are assumed;
// they were chosen on a closed-loop model with a 2.35 mF DC link, where the
// link returns to within 0.5 V of its reference within 0.1 s of a 50 %
// load step.
//
// Interface: on in_valid the sample udc is taken against vref; one clock
// later out_valid pulses and u holds the new output, which stays until the
// next sample. sat is high while the output is at its limit.
module pi_controller
  import sapf_pkg::*;
#(
  parameter fix_t  KP   = 32'sd1310720,
  parameter coef_t KITS = 32'sd42949673,
  parameter fix_t  UMAX = 32'sd131072000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fix_t udc,
  input  fix_t vref,
  output logic out_valid,
  output fix_t u,
  output logic sat
);

  localparam logic signed [65:0] ACC_MAX = 66'(signed'(UMAX)) <<< CFRAC;

  logic signed [65:0] acc, acc_nxt;
  fix_t               e, ui;
  logic signed [65:0] u_sum;

  always_comb begin
    e       = sub_sat(vref, udc);
    acc_nxt = acc + 66'(mul_full(e, KITS));
    if (acc_nxt > ACC_MAX)       acc_nxt = ACC_MAX;
    else if (acc_nxt < -ACC_MAX) acc_nxt = -ACC_MAX;
    ui      = fix_t'((acc_nxt + (66'sd1 <<< (CFRAC - 1))) >>> CFRAC);
    u_sum   = 66'(mul_fix(KP, e)) + 66'(ui);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      u         <= '0;
      sat       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        acc <= acc_nxt;
        if (u_sum > 66'(signed'(UMAX))) begin
          u   <= UMAX;
          sat <= 1'b1;
        end else if (u_sum < -66'(signed'(UMAX))) begin
          u   <= -UMAX;
          sat <= 1'b1;
        end else begin
          u   <= fix_t'(u_sum);
          sat <= 1'b0;
        end
      end
    end
  end

endmodule
