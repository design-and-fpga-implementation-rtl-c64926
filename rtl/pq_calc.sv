// Instantaneous power calculation of the dual-STF pq method.
//
//   p = Va' * Iah + Vb' * Ibh      (active power of the harmonic current)
//   q = Va' * Ib  - Vb' * Ia       (reactive power of the load current)
//
// Va', Vb' are the fundamental components of the source voltage taken from
// the voltage STF, Iah, Ibh the harmonic components of the load current
// (load current minus the output of the current STF) and Ia, Ib the
// alpha-beta load current itself. The equations and which current enters
// which term follow the controller block diagram; the harmonic current is
// formed outside this block, where the diagram draws its two subtractors.
//
// Each product keeps 64 bits; the sums are rounded and saturated to Q16.16.
//
// Interface: inputs are accepted on in_valid; p and q appear one clock later
// with out_valid high for one cycle.
module pq_calc
  import sapf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  ab_t  v1,     // fundamental source voltage
  input  ab_t  ih,     // harmonic load current
  input  ab_t  il,     // load current
  output logic out_valid,
  output fix_t p,
  output fix_t q
);

  logic signed [64:0] p_full, q_full;

  always_comb begin
    p_full = 65'(mul_full(v1.a, ih.a)) + 65'(mul_full(v1.b, ih.b));
    q_full = 65'(mul_full(v1.a, il.b)) - 65'(mul_full(v1.b, il.a));
  end

  // Round a 65-bit Q32.32 sum to Q16.16 with saturation.
  function automatic fix_t to_q16(input logic signed [64:0] v);
    return sat66((66'(v) + (66'sd1 <<< (FRAC - 1))) >>> FRAC);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p         <= '0;
      q         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        p <= to_q16(p_full);
        q <= to_q16(q_full);
      end
    end
  end

endmodule
