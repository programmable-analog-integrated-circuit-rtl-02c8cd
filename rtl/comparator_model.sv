// comparator_model: behavioural model of the differential comparator cell.
//
// Behavioural model, not a circuit. The output is high when the positive
// input (IRS 0) is above the negative input (IRS 1), with no offset,
// hysteresis or delay. The result is bit 0 of the digital inputs of the
// cell's module register, where software reads it. Input assignment and
// output bit are this design's choice.
module comparator_model
  import panic_pkg::*;
(
  input  mv_t  vp,
  input  mv_t  vn,
  output logic out
);

  assign out = (vp > vn);

endmodule
