// Testbench of hysteresis_ctrl with its default band of 0.2 A: directed
// steps across and along the band edges, then random errors with random
// enables, compared with the switching rules (below -HB: S1, S4 on; above
// +HB: S2, S3 on; inside: hold; all off out of reset). Counts both kinds of
// transition and the holds inside the band.
module hysteresis_ctrl_tb;
  import sapf_pkg::*;
  import tb_util_pkg::*;

  localparam fix_t HB = 32'sd13107;

  logic       clk = 0, rst_n = 0, en = 0, pulse1, pulse2;
  logic [3:0] gate;
  fix_t       err = '0;
  int         checks = 0, failures = 0, n_on14 = 0, n_on23 = 0, n_hold = 0;
  logic       m1 = 0, m2 = 0;

  hysteresis_ctrl dut (.clk, .rst_n, .en, .err, .pulse1, .pulse2, .gate);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input fix_t e, input logic ena);
    logic p1, p2;
    err <= e; en <= ena;
    @(posedge clk);
    #1;
    p1 = m1; p2 = m2;
    if (ena) begin
      if (e < -HB)     begin m1 = 1; m2 = 0; end
      else if (e > HB) begin m1 = 0; m2 = 1; end
    end
    if (m1 && !p1) n_on14++;
    if (m2 && !p2) n_on23++;
    if (ena && e >= -HB && e <= HB && (p1 || p2)) n_hold++;
    checks++;
    if (pulse1 !== m1 || pulse2 !== m2 || gate !== {m1, m2, m2, m1}) begin
      failures++;
      $display("err=%f en=%b got %b%b gate=%b exp %b%b", f2r(e), ena, pulse1, pulse2, gate, m1, m2);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (pulse1 || pulse2) failures++;
    rst_n <= 1;
    @(posedge clk);
    apply(r2f(0.1), 1);      // inside the band: stays off
    apply(-HB, 1);           // on the edge: no change
    apply(-HB - 1, 1);       // below: S1 S4
    apply(r2f(0.15), 1);     // inside: hold
    apply(HB, 1);            // on the edge: hold
    apply(r2f(1.0), 0);      // disabled: hold
    apply(HB + 1, 1);        // above: S2 S3
    apply(r2f(-0.19), 1);    // inside: hold
    apply(r2f(-5.0), 1);     // below: S1 S4
    for (int n = 0; n < 5000; n++)
      apply(r2f((real'($urandom_range(0, 1000)) - 500.0) / 1000.0), 1'($urandom_range(0, 3) != 0));
    checks++;
    if (n_on14 == 0 || n_on23 == 0 || n_hold == 0) failures++;
    $display("S1S4 turn-ons %0d, S2S3 turn-ons %0d, holds %0d", n_on14, n_on23, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
