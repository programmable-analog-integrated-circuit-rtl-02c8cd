// sample_hold_model: behavioural model of the sample & hold cell.
//
// Behavioural model, not a circuit. While track is high the output follows
// vin; when track falls the output holds the last value (an ideal hold
// capacitor: no droop, no pedestal). track is bit 0 of the cell's module
// register; vin comes from IRS 0, the output goes to ORS 0. The hold is a
// level-sensitive latch on purpose: that is what a sample & hold is, so the
// latch that lint reports here stands. Control bit and polarity are this
// design's choice.
module sample_hold_model
  import panic_pkg::*;
(
  input  logic track,
  input  mv_t  vin,
  output mv_t  vout
);

  always_latch begin
    if (track) vout = vin;
  end

endmodule
