// control: the chip's control logic.
//
// Made of the SPI slave, the control signal decoder, the address register,
// the module address decoder and the table of content. It receives 16-bit
// frames (instruction byte, data byte) on sck/mosi and drives a shared bus
// to the analog module frameworks: a one-hot module select, the line
// address, a write strobe with its data byte, and the ReadBack index. For
// read-type instructions it returns, during the data byte, the addressed
// framework's register, its ReadBack entry, or a table-of-content tag.
//
// Instructions (instruction byte = opcode[7:5] operand[4:0]):
//   SET_ADDR  module = operand[3:0], line = data[2:0]
//   WRITE     data -> register (module, line)
//   READ      register (module, line) -> miso
//   READ_TOC  tag of module operand[3:0] -> miso
//   READBACK  source wired to input operand[2:0] of IRS (module, line) -> miso
// Writes take effect on the 16th rising sck edge of the frame; read data
// leaves on miso from the falling edge after the 8th rising edge. Reads of a
// module address with no module behind it return zero. The building blocks
// follow the chip's description; the instruction set is this design's own.
module control
  import panic_pkg::*;
#(
  parameter int unsigned N_MODULES = 6,
  parameter toc_t        TOC       = PROTO_TOC
) (
  input  logic                 sck,
  input  logic                 reset,
  input  logic                 enable,
  input  logic                 mosi,
  output logic                 miso,
  output logic                 miso_oe,
  // bus to the analog module frameworks
  output logic [N_MODULES-1:0] mod_sel,
  output logic [2:0]           line,
  output logic                 we,
  output logic [7:0]           wdata,
  output logic [2:0]           rb_idx,
  input  logic [7:0]           mod_rdata [N_MODULES],
  input  src_t                 mod_rb    [N_MODULES]
);

  logic [7:0] instr, rx_data, tx_byte;
  logic       instr_valid, last_bit;
  logic       load_addr, sel_reg, sel_toc, sel_rb;
  logic [3:0] module_addr;
  logic       mod_valid;
  tag_t       tag;

  spi_slave u_spi (
    .sck, .reset, .enable, .mosi, .miso,
    .instr, .instr_valid, .last_bit, .rx_data, .tx_byte
  );

  ctrl_decoder u_dec (
    .instr, .instr_valid, .last_bit, .enable,
    .load_addr, .write_reg(we), .sel_reg, .sel_toc, .sel_rb, .miso_oe
  );

  addr_reg u_addr (
    .clk(sck), .reset, .load(load_addr),
    .module_in(instr[3:0]), .line_in(rx_data[2:0]),
    .module_addr, .line_addr(line)
  );

  module_addr_decoder #(.N_MODULES(N_MODULES)) u_mdec (
    .addr(module_addr), .sel(mod_sel), .valid(mod_valid)
  );

  toc_rom #(.TAGS(TOC)) u_toc (
    .addr(instr[3:0]), .tag
  );

  assign wdata  = rx_data;
  assign rb_idx = instr[2:0];

  // at most one framework is selected, and miso is driven only when enabled
  always_comb begin
    assert ($onehot0(mod_sel)) else $error("several modules selected");
    if (miso_oe) assert (enable && instr_valid) else $error("miso driven outside a read");
  end

  always_comb begin
    tx_byte = '0;
    if (sel_toc) tx_byte = tag;
    for (int unsigned m = 0; m < N_MODULES; m++)
      if (mod_valid && mod_sel[m]) begin
        if (sel_reg) tx_byte = mod_rdata[m];
        if (sel_rb)  tx_byte = mod_rb[m];
      end
  end

endmodule
