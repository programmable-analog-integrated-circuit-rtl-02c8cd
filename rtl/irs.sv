// irs: input register & switch, digital part, with ReadBack.
//
// An IRS is one input of an analog cell. Eight signals are wired to it in
// the chip's layout; the 8-bit register holds one bit per signal, and a set
// bit closes the analog switch that connects that signal to the cell input.
// Any combination of the eight may be closed. The register is written on the
// rising clk edge when en and we are high, read back as it is, and cleared
// by reset (all switches open).
//
// ReadBack: SRC holds, for each of the eight inputs, a code naming the
// signal the layout wired to it (see panic_pkg: none, an off-chip input, or
// an ORS of some module). rb_idx selects one entry, which appears on rb_data
// combinationally. Software reads these entries at start-up to learn which
// connections between cells are possible. The switch count and the idea of
// ReadBack follow the chip's description; the source codes are this design's
// own.
module irs
  import panic_pkg::*;
#(
  parameter irs_src_t SRC = '0
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       en,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] sw,        // switch controls, bit j closes input j
  input  logic [2:0] rb_idx,
  output src_t       rb_data
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)          sw <= '0;
    else if (en && we)  sw <= wdata;
  end

  assign rb_data = SRC[rb_idx];

endmodule
