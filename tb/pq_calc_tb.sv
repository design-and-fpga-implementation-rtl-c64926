// Testbench of pq_calc: random voltages up to +/-60 V and currents up to
// +/-20 A; p and q are compared with p = Va'Iah + Vb'Ibh and
// q = Va'Ib - Vb'Ia computed in floating point from the same words, to
// within two LSB, one clock after in_valid.
module pq_calc_tb;
  import sapf_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  ab_t  v1 = '0, ih = '0, il = '0;
  fix_t p, q;
  int   checks = 0, failures = 0;

  pq_calc dut (.clk, .rst_n, .in_valid, .v1, .ih, .il, .out_valid, .p, .q);

  always #5 clk = ~clk;

  function automatic real rnd(input real lim);
    return (real'($urandom) / 4294967295.0 * 2.0 - 1.0) * lim;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      ab_t va, ha, la;
      real ep, eq;
      va.a = r2f(rnd(60.0)); va.b = r2f(rnd(60.0));
      ha.a = r2f(rnd(20.0)); ha.b = r2f(rnd(20.0));
      la.a = r2f(rnd(20.0)); la.b = r2f(rnd(20.0));
      v1 <= va; ih <= ha; il <= la;
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      ep = f2r(va.a) * f2r(ha.a) + f2r(va.b) * f2r(ha.b);
      eq = f2r(va.a) * f2r(la.b) - f2r(va.b) * f2r(la.a);
      checks++;
      if (!out_valid || rabs(f2r(p) - ep) > 3.0e-5 || rabs(f2r(q) - eq) > 3.0e-5) begin
        failures++;
        $display("n=%0d valid=%b p=%f/%f q=%f/%f", n, out_valid, f2r(p), ep, f2r(q), eq);
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin failures++; $display("spurious out_valid"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
