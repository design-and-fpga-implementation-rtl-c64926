// Reference compensation current calculation.
//
//   Ia_ref = (Va' * p - Vb' * q) / (Va'^2 + Vb'^2)
//   Ib_ref = (Vb' * p + Va' * q) / (Va'^2 + Vb'^2)
//
// p here is the harmonic active power less the DC-link PI output, q the
// reactive power, Va', Vb' the fundamental source voltage.
//
// Structure: the first clock registers the two numerators and the common
// denominator at full precision (Q32.32, 65 and 64 bits). Two unsigned
// sequential dividers then work on the numerator magnitudes shifted left by
// 16 bits, one quotient bit per clock, so the quotients come out in Q16.16;
// the signs are put back and the results saturated to the 32-bit range.
// While the denominator is zero (the voltage STF has not yet built up an
// output) both references are zero. The division method is this design's
// choice.
//
// Timing: out_valid pulses 2 + NW = 82 clocks after in_valid, NW = 80
// being the dividend width; i_ref then holds until the next result.
// A new in_valid must not arrive while busy is high; an assertion checks
// this.
module ref_current_calc
  import sapf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  ab_t  v1,     // fundamental source voltage
  input  fix_t p,      // active power reference (p less PI output)
  input  fix_t q,      // reactive power
  output logic busy,
  output logic out_valid,
  output ab_t  i_ref,
  output logic den_zero // last result was forced to zero
);

  localparam int NW = 80;
  localparam int DW = 64;

  logic signed [64:0] na, nb;
  logic        [63:0] den;
  logic               start;
  logic               sa, sb, dz;
  logic        [NW-1:0] mag_a, mag_b;
  logic        [NW-1:0] qa, qb;
  logic               done_a, done_b, busy_a, busy_b;

  // Numerators and denominator, registered on in_valid.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      na    <= '0;
      nb    <= '0;
      den   <= '0;
      start <= 1'b0;
    end else begin
      start <= in_valid && !busy;
      if (in_valid && !busy) begin
        na  <= 65'(mul_full(v1.a, p)) - 65'(mul_full(v1.b, q));
        nb  <= 65'(mul_full(v1.b, p)) + 65'(mul_full(v1.a, q));
        den <= 64'(mul_full(v1.a, v1.a)) + 64'(mul_full(v1.b, v1.b));
      end
    end
  end

  function automatic logic [NW-1:0] mag_shift(input logic signed [64:0] v);
    logic [64:0] m;
    m = v[64] ? 65'(-v) : 65'(v);
    return NW'(m) << FRAC;
  endfunction

  assign mag_a = mag_shift(na);
  assign mag_b = mag_shift(nb);

  seq_divider #(.NW(NW), .DW(DW)) u_div_a (
    .clk, .rst_n, .start, .dividend(mag_a), .divisor(den),
    .busy(busy_a), .done(done_a), .quotient(qa)
  );

  seq_divider #(.NW(NW), .DW(DW)) u_div_b (
    .clk, .rst_n, .start, .dividend(mag_b), .divisor(den),
    .busy(busy_b), .done(done_b), .quotient(qb)
  );

  // Signs and zero-denominator flag of the division in flight.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa <= 1'b0;
      sb <= 1'b0;
      dz <= 1'b0;
    end else if (start) begin
      sa <= na[64];
      sb <= nb[64];
      dz <= (den == '0);
    end
  end

  assign busy = start || busy_a || busy_b || done_a;

  function automatic fix_t signed_sat(input logic [NW-1:0] m, input logic neg);
    logic signed [NW:0] v;
    v = neg ? -$signed({1'b0, m}) : $signed({1'b0, m});
    if (v > (NW+1)'(signed'(FIX_MAX))) return FIX_MAX;
    if (v < (NW+1)'(signed'(FIX_MIN))) return FIX_MIN;
    return fix_t'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_ref     <= '0;
      out_valid <= 1'b0;
      den_zero  <= 1'b0;
    end else begin
      out_valid <= done_a;
      if (done_a) begin
        den_zero <= dz;
        i_ref.a  <= dz ? '0 : signed_sat(qa, sa);
        i_ref.b  <= dz ? '0 : signed_sat(qb, sb);
      end
    end
  end

  // Both dividers run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) done_a == done_b);
  // A new sample must not arrive during a division.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !busy);

endmodule
