// addr_reg: module address register.
//
// Holds the address of the register that the next write or read reaches:
// a 4-bit module address (up to 16 analog modules) and a 3-bit line address
// inside that module's framework (IRS 0-4, ORS 0-1, module register). It is
// loaded on the rising sck edge that completes a set-address frame: the
// module address comes from the instruction's operand, the line address
// from the data byte. Reset clears it to module 0, line 0. The split of the
// address into module and line follows the chip's two decoders; the field
// positions are this design's choice.
module addr_reg (
  input  logic       clk,
  input  logic       reset,
  input  logic       load,
  input  logic [3:0] module_in,
  input  logic [2:0] line_in,
  output logic [3:0] module_addr,
  output logic [2:0] line_addr
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      module_addr <= '0;
      line_addr   <= '0;
    end else if (load) begin
      module_addr <= module_in;
      line_addr   <= line_in;
    end
  end

endmodule
