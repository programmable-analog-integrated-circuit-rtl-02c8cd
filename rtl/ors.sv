// ors: output register & switch, digital part.
//
// An ORS buffers one output of an analog cell and may connect it to one, or
// none, of the chip's four off-chip analog outputs. The register holds a
// connect bit (bit 2) and the number of the output (bits 1:0); the switch
// controls pin_sw are one-hot when connected and all zero otherwise, so two
// outputs are never closed at once. The buffered signal also goes, through
// the layout's fixed wiring, to IRS inputs of other cells whatever the
// register holds. Written on the rising clk edge when en and we are high;
// reset disconnects. Reads return the three register bits, zero-extended.
// The register encoding is this design's choice.
module ors (
  input  logic       clk,
  input  logic       reset,
  input  logic       en,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic [3:0] pin_sw
);

  logic       connect;
  logic [1:0] pin;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      connect <= 1'b0;
      pin     <= '0;
    end else if (en && we) begin
      connect <= wdata[2];
      pin     <= wdata[1:0];
    end
  end

  always_comb begin
    pin_sw = '0;
    if (connect) pin_sw[pin] = 1'b1;
    rdata = {5'b0, connect, pin};
  end

  // an ORS never drives two pins
  always_comb assert ($onehot0(pin_sw)) else $error("ORS drives several pins");

endmodule
