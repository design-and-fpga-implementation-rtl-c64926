// Quarter-period delay: builds the alpha-beta pair of one single-phase signal.
//
// The measured signal is taken as the alpha component. The fictitious beta
// component is the same signal delayed by 90 degrees of the fundamental,
// which for a sampled signal is a delay of DEPTH = Fs / (4 * f1) samples.
// With the 50 Hz grid and the 25 kHz sample rate assumed by this design
// (the rate is this design's choice) DEPTH is 125.
//
// The delay line is a circular buffer in a plain memory array. Until DEPTH
// samples have been written the beta output is zero, so nothing
// uninitialised is ever read out.
//
// Interface: on a cycle with in_valid high the sample x is accepted; one clock
// later out_valid is high for one cycle and y.a holds x, y.b holds the sample
// accepted DEPTH samples earlier.
module quarter_delay
  import sapf_pkg::*;
#(
  parameter int DEPTH = 125
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fix_t x,
  output logic out_valid,
  output ab_t  y
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fix_t          mem [DEPTH];
  logic [AW-1:0] ptr;
  logic          full;

  // The memory itself has no reset; the full flag masks it until written.
  always_ff @(posedge clk) begin
    if (in_valid) mem[ptr] <= x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      full      <= 1'b0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y.a <= x;
        y.b <= full ? mem[ptr] : '0;
        if (ptr == AW'(DEPTH - 1)) begin
          ptr  <= '0;
          full <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

endmodule
