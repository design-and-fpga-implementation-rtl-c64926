// Testbench of the self-tuning filter at its default tuning (50 Hz, K = 50,
// 25 kHz samples). The input is a 40 V fundamental with 20 % fifth and 10 %
// seventh harmonic, beta being the same signal a quarter period later.
// Every output is compared with a floating-point model of the filter
// equation, and once the filter has settled (0.2 s) with the fundamental
// itself: zero phase delay and unity gain must hold to 2 %. out_valid must
// follow in_valid by one clock.
module stf_tb;
  import sapf_pkg::*;
  import tb_util_pkg::*;

  localparam real TS = 4.0e-5;
  localparam real W1 = 2.0 * PI_R * 50.0;
  localparam real A  = 40.0;
  localparam int  N  = 8000;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  ab_t  x = '0, y;
  int   checks = 0, failures = 0;
  real  max_err_model = 0.0, max_err_fund = 0.0;

  stf dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;

  function automatic real sig(input real t);
    return A * $cos(W1 * t + 0.3) + 0.2 * A * $cos(5.0 * W1 * t + 1.0)
         + 0.1 * A * $cos(7.0 * W1 * t - 0.5);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stf_model m;
    m = new(50.0, W1, TS);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < N; n++) begin
      real t, xa, xb, ea, eb, fa, fb;
      t  = n * TS;
      xa = sig(t);
      xb = sig(t - 0.005);
      x.a      <= r2f(xa);
      x.b      <= r2f(xb);
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      m.step(f2r(r2f(xa)), f2r(r2f(xb)));
      checks++;
      if (!out_valid) begin failures++; $display("n=%0d no out_valid", n); end
      ea = rabs(f2r(y.a) - m.oa);
      eb = rabs(f2r(y.b) - m.ob);
      if (ea > max_err_model) max_err_model = ea;
      if (eb > max_err_model) max_err_model = eb;
      checks++;
      if (ea > 0.01 || eb > 0.01) begin
        failures++;
        $display("n=%0d model mismatch %f %f / %f %f", n, f2r(y.a), f2r(y.b), m.oa, m.ob);
      end
      if (n >= 5000) begin
        fa = A * $cos(W1 * t + 0.3);
        fb = A * $cos(W1 * (t - 0.005) + 0.3);
        ea = rabs(f2r(y.a) - fa);
        eb = rabs(f2r(y.b) - fb);
        if (ea > max_err_fund) max_err_fund = ea;
        if (eb > max_err_fund) max_err_fund = eb;
        checks++;
        if (ea > 0.02 * A || eb > 0.02 * A) begin
          failures++;
          $display("n=%0d fundamental mismatch %f %f / %f %f", n, f2r(y.a), f2r(y.b), fa, fb);
        end
      end
      repeat ($urandom_range(0, 2)) begin
        @(posedge clk);
        #1;
        checks++;
        if (out_valid) begin failures++; $display("spurious out_valid"); end
      end
    end
    $display("max |rtl - model| = %f, max |rtl - fundamental| = %f", max_err_model, max_err_fund);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
