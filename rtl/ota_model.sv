// ota_model: behavioural model of the differential transconductance amplifier.
//
// Behavioural model, not a circuit. It is modelled as a differential
// voltage amplifier with open-loop gain GAIN around the common-mode level
// VCM_MV, each output clipped to the rails 0..VDD_MV:
//   outp = VCM + GAIN*(vp - vn),  outn = VCM - GAIN*(vp - vn).
// vp, vn come from IRS 0 and 1, outp, outn go to ORS 0 and 1. Output
// current, bandwidth and load are not modelled, and gain, supply and common
// mode are this design's assumptions.
module ota_model
  import panic_pkg::*;
#(
  parameter int VDD_MV = 3300,
  parameter int VCM_MV = 1650,
  parameter int GAIN   = 1000
) (
  input  mv_t vp,
  input  mv_t vn,
  output mv_t outp,
  output mv_t outn
);

  function automatic mv_t clip(longint v);
    if (v < 0)              return '0;
    if (v > longint'(VDD_MV)) return mv_t'(VDD_MV);
    return mv_t'(v);
  endfunction

  longint diff;

  always_comb begin
    diff = longint'(GAIN) * (longint'(vp) - longint'(vn));
    outp = clip(longint'(VCM_MV) + diff);
    outn = clip(longint'(VCM_MV) - diff);
  end

endmodule
