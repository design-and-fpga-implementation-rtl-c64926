// Testbench of quarter_delay at its default depth (125 samples): random
// samples at random spacing; checks that alpha is the sample itself, beta
// the sample 125 earlier (zero before that), and that out_valid follows
// in_valid by exactly one clock.
module quarter_delay_tb;
  import sapf_pkg::*;

  localparam int DEPTH = 125;
  localparam int N     = 600;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  fix_t x = '0;
  ab_t  y;
  fix_t hist [N];
  int   checks = 0, failures = 0;

  quarter_delay dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < N; n++) begin
      int gap;
      fix_t exp_b;
      gap = $urandom_range(0, 3);
      repeat (gap) begin
        @(posedge clk);
        #1;
        checks++;
        if (out_valid) begin failures++; $display("spurious out_valid"); end
      end
      hist[n] = fix_t'($urandom);
      x        <= hist[n];
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      exp_b = (n >= DEPTH) ? hist[n-DEPTH] : '0;
      checks++;
      if (!out_valid || y.a !== hist[n] || y.b !== exp_b) begin
        failures++;
        $display("n=%0d valid=%b a=%h/%h b=%h/%h", n, out_valid, y.a, hist[n], y.b, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
