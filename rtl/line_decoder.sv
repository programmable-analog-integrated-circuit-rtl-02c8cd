// line_decoder: enable for each register of one analog module framework.
//
// Combinational. When the module is selected, the 3-bit line address is
// decoded into one enable per register: lines 0-4 are the IRS cells, lines
// 5 and 6 the two ORS cells, line 7 the module register. Lines of IRS cells
// the module does not have (N_IRS < 5) are never enabled. That the decoder
// gives each IRS, ORS and the module register its enable follows the chip's
// description; the line numbering is this design's choice.
module line_decoder
  import panic_pkg::*;
#(
  parameter int unsigned N_IRS = 5
) (
  input  logic             sel,
  input  logic [2:0]       line,
  output logic [N_IRS-1:0] irs_en,
  output logic [1:0]       ors_en,
  output logic             mreg_en
);

  always_comb begin
    irs_en = '0;
    for (int unsigned i = 0; i < N_IRS; i++)
      irs_en[i] = sel && (line == 3'(i));
    ors_en[0] = sel && (line == LINE_ORS0);
    ors_en[1] = sel && (line == LINE_ORS1);
    mreg_en   = sel && (line == LINE_MREG);
  end

endmodule
