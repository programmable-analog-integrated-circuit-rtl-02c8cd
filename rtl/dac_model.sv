// dac_model: behavioural model of the 8-bit digital-to-analog converter cell.
//
// Behavioural model, not a circuit. The cell's 8-bit code comes from its
// module register; its output goes to ORS 0. The output is
// code * VREF_MV / 256 millivolts, an ideal converter with no settling time.
// The 8-bit width matches the 8-bit conversion the chip's converter example
// performs; the reference voltage is this design's assumption.
module dac_model
  import panic_pkg::*;
#(
  parameter int unsigned VREF_MV = 2560
) (
  input  logic [7:0] code,
  output mv_t        vout
);

  assign vout = mv_t'((32'(code) * VREF_MV) >> 8);

endmodule
