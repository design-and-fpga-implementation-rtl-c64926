// Testbench of ref_current_calc. Random fundamental voltages (5 V to 60 V
// at any angle) with random p and q in +/-1000; both references are compared
// with equations Ia = (Va p - Vb q) / |V|^2, Ib = (Vb p + Va q) / |V|^2 in
// floating point to within 1e-4 A. Also checked: the latency of 82 clocks
// from in_valid to out_valid, busy during the division, a zero voltage
// giving zero references with den_zero set, and saturation of an
// out-of-range quotient.
module ref_current_calc_tb;
  import sapf_pkg::*;
  import tb_util_pkg::*;

  localparam int LAT = 82;

  logic clk = 0, rst_n = 0, in_valid = 0, busy, out_valid, den_zero;
  ab_t  v1 = '0, i_ref;
  fix_t p = '0, q = '0;
  int   checks = 0, failures = 0, n_zero = 0, n_sat = 0;

  ref_current_calc dut (.clk, .rst_n, .in_valid, .v1, .p, .q, .busy, .out_valid, .i_ref, .den_zero);

  always #5 clk = ~clk;

  function automatic real rnd(input real lim);
    return (real'($urandom) / 4294967295.0 * 2.0 - 1.0) * lim;
  endfunction

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input ab_t va, input fix_t pp, input fix_t qq,
                         output ab_t res, output logic dz, output int lat);
    v1 <= va; p <= pp; q <= qq;
    in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
    lat = 0;
    do begin
      @(posedge clk);
      #1;
      lat++;
      if (lat == 5) begin checks++; if (!busy) begin failures++; $display("busy low"); end end
    end while (!out_valid && lat < 1000);
    res = i_ref;
    dz  = den_zero;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 1500; n++) begin
      ab_t  va, res;
      fix_t pp, qq;
      logic dz;
      int   lat;
      real  mag, ang, d, ea, eb;
      mag = 5.0 + (real'($urandom_range(0, 55000)) / 1000.0);
      ang = rnd(PI_R);
      va.a = r2f(mag * $cos(ang));
      va.b = r2f(mag * $sin(ang));
      pp = r2f(rnd(1000.0));
      qq = r2f(rnd(1000.0));
      if (n == 7)  va = '0;                        // zero voltage
      if (n == 11) begin                           // quotient out of range
        va.a = r2f(0.01); va.b = '0; pp = r2f(1000.0); qq = '0;
      end
      run_one(va, pp, qq, res, dz, lat);
      checks++;
      if (lat != LAT) begin failures++; $display("n=%0d latency %0d", n, lat); end
      if (n == 7) begin
        checks++;
        if (!dz || res != '0) begin failures++; $display("zero voltage: %h %b", res, dz); end
        else n_zero++;
      end else if (n == 11) begin
        checks++;
        if (res.a != FIX_MAX || dz) begin failures++; $display("no saturation: %h", res.a); end
        else n_sat++;
      end else begin
        d  = f2r(va.a) ** 2 + f2r(va.b) ** 2;
        ea = (f2r(va.a) * f2r(pp) - f2r(va.b) * f2r(qq)) / d;
        eb = (f2r(va.b) * f2r(pp) + f2r(va.a) * f2r(qq)) / d;
        checks++;
        if (dz || rabs(f2r(res.a) - ea) > 1.0e-4 || rabs(f2r(res.b) - eb) > 1.0e-4) begin
          failures++;
          $display("n=%0d ia=%f/%f ib=%f/%f", n, f2r(res.a), ea, f2r(res.b), eb);
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (busy) begin failures++; $display("busy after result"); end
    end
    checks++;
    if (n_zero == 0 || n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
