// Hysteresis current controller of the single-phase voltage source inverter.
//
// err is the compensation current less the reference current, ic - iref.
//   err < -HB  (ic below iref - HB): S1, S4 on,  S2, S3 off  (pulse1)
//   err > +HB  (ic above iref + HB): S1, S4 off, S2, S3 on   (pulse2)
//   otherwise the switches keep their state.
// S1, S3 are the upper and S2, S4 the lower switches of the two legs. These
// rules are the published method's. Out of reset all four switches are off until the
// error first leaves the band (this design's choice); from then on exactly
// one diagonal pair conducts. No dead time is inserted.
//
// Parameter HB is the half-width of the band in Q16.16; its default of
// 0.2 A is assumed.
//
// Interface: err is compared on each clock with en high; the pulses change
// one clock later and are registered. gate[0..3] drive S1..S4.
module hysteresis_ctrl
  import sapf_pkg::*;
#(
  parameter fix_t HB = 32'sd13107
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  fix_t       err,
  output logic       pulse1,   // S1 and S4
  output logic       pulse2,   // S2 and S3
  output logic [3:0] gate      // {S4, S3, S2, S1}
);

  typedef enum logic [1:0] {
    ST_OFF  = 2'b00,
    ST_S14  = 2'b01,
    ST_S23  = 2'b10
  } hyst_state_e;

  hyst_state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_OFF;
    end else if (en) begin
      if (err < -HB)      state <= ST_S14;
      else if (err > HB)  state <= ST_S23;
    end
  end

  assign pulse1 = (state == ST_S14);
  assign pulse2 = (state == ST_S23);
  assign gate   = {pulse1, pulse2, pulse2, pulse1};

  // The two switches of one leg never conduct together.
  a_leg_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(pulse1 && pulse2));

endmodule
