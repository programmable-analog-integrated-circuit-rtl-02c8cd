// module_reg: the module register, 8-bit digital output and input of a cell.
//
// Writing sets the 8 bits dout that go to the analog cell as control or data
// (the DAC's code, the sample & hold's track bit). Reading returns din, the
// 8 digital signals the cell drives back (the comparator's decision). Written
// on the rising clk edge when en and we are high; reset clears dout. din is
// passed to the read path without synchronisation: the chip is read through
// SPI, whose master samples it half an sck period later, so a din edge right
// at that time may be read either way. That reads return din rather than
// dout is this design's choice.
module module_reg (
  input  logic       clk,
  input  logic       reset,
  input  logic       en,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] dout,
  input  logic [7:0] din,
  output logic [7:0] rdata
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)         dout <= '0;
    else if (en && we) dout <= wdata;
  end

  assign rdata = din;

endmodule
