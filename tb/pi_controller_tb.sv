// Testbench of pi_controller. Two instances: one at the default gains and
// limit, one with a limit of 20 so that saturation occurs. The DC-link
// voltage steps between 50 V, 60 V and 70 V with ripple against a 60 V
// reference; every output is compared with a floating-point PI model, and
// the sign convention is checked: a DC link below the reference gives a
// positive output.
module pi_controller_tb;
  import sapf_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, v0, v1;
  fix_t udc = '0, vref = '0, u0, u1;
  logic s0, s1;
  int   checks = 0, failures = 0, n_sat = 0, n_neg = 0, n_pos = 0;

  pi_controller dut (.clk, .rst_n, .in_valid, .udc, .vref, .out_valid(v0), .u(u0), .sat(s0));
  pi_controller #(.UMAX(32'sd1310720)) dut_lim (
    .clk, .rst_n, .in_valid, .udc, .vref, .out_valid(v1), .u(u1), .sat(s1)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pi_model m0, m1;
    m0 = new(20.0, c2r(32'sd42949673), 2000.0);
    m1 = new(20.0, c2r(32'sd42949673), 20.0);
    vref <= r2f(60.0);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 30000; n++) begin
      real vd;
      fix_t vq;
      vd = (n < 10000) ? 50.0 : (n < 20000) ? 70.0 : 60.0;
      vd = vd + 0.5 * $sin(2.0 * PI_R * 100.0 * n * 4.0e-5);
      vq = r2f(vd);
      udc <= vq;
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      m0.step(f2r(vq), 60.0);
      m1.step(f2r(vq), 60.0);
      checks++;
      if (!v0 || !v1 || rabs(f2r(u0) - m0.u) > 2.0e-3 || rabs(f2r(u1) - m1.u) > 2.0e-3
          || s1 != m1.sat) begin
        failures++;
        if (failures < 20)
          $display("n=%0d u0=%f/%f u1=%f/%f sat=%b/%b", n, f2r(u0), m0.u, f2r(u1), m1.u, s1, m1.sat);
      end
      if (s1) n_sat++;
      if (n == 9999)  begin checks++; if (!(u0 > 0)) failures++; n_neg++; end
      if (n == 19999) begin checks++; if (!(u0 < 0)) failures++; n_pos++; end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("limit never reached"); end
    $display("saturated samples: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
