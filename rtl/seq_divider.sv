// Unsigned sequential divider, one quotient bit per clock.
//
// Restoring long division: the dividend is shifted into a remainder register
// most significant bit first; each clock the divisor is subtracted when it
// fits, and the quotient bit is set. A division takes NW clocks from start
// to done. A zero divisor gives an all-ones quotient, which the caller is
// expected to catch.
//
// Interface: start (while not busy) loads dividend and divisor; busy stays
// high during the division; done pulses for one clock when the quotient
// is valid; it holds until the next start.
module seq_divider #(
  parameter int NW = 80,  // dividend and quotient width
  parameter int DW = 64   // divisor and remainder width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient
);

  localparam int CW = $clog2(NW + 1);

  logic [NW-1:0] num;
  logic [DW-1:0] remainder;
  logic [DW-1:0] den;
  logic [CW-1:0] cnt;
  logic [DW:0]   trial;
  logic [DW:0]   diff;

  always_comb begin
    trial = {remainder, num[NW-1]};
    diff  = trial - {1'b0, den};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num       <= '0;
      den       <= '0;
      cnt       <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        num       <= dividend;
        den       <= divisor;
        cnt       <= CW'(NW);
        busy      <= 1'b1;
        quotient  <= '0;
        remainder <= '0;
      end else if (busy) begin
        num <= num << 1;
        if (!diff[DW]) begin
          remainder <= diff[DW-1:0];
          quotient  <= {quotient[NW-2:0], 1'b1};
        end else begin
          remainder <= trial[DW-1:0];
          quotient  <= {quotient[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
