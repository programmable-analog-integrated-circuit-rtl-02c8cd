// ctrl_decoder: control signal decoder.
//
// Purely combinational. It turns the instruction byte received over SPI into
// the control signals of the chip: an address load, a register write, and
// the source of the byte returned on miso (a register, the table of
// content, or a ReadBack entry). Writes happen only on the rising sck edge
// that completes a frame (last_bit high), so a frame cut short by enable
// going low changes nothing. miso is driven only during the data byte of a
// read-type instruction, so several chips can share the miso line. The
// opcode values are this design's own (see panic_pkg).
module ctrl_decoder
  import panic_pkg::*;
(
  input  logic [7:0] instr,
  input  logic       instr_valid,
  input  logic       last_bit,
  input  logic       enable,
  output logic       load_addr,   // strobe: load the address register
  output logic       write_reg,   // strobe: write the addressed register
  output logic       sel_reg,     // miso source: addressed register
  output logic       sel_toc,     // miso source: table of content
  output logic       sel_rb,      // miso source: ReadBack
  output logic       miso_oe      // drive miso
);

  opcode_e op;

  always_comb begin
    op        = opcode_e'(instr[7:5]);
    load_addr = 1'b0;
    write_reg = 1'b0;
    sel_reg   = 1'b0;
    sel_toc   = 1'b0;
    sel_rb    = 1'b0;
    if (instr_valid) begin
      case (op)
        OP_SET_ADDR: load_addr = last_bit;
        OP_WRITE:    write_reg = last_bit;
        OP_READ:     sel_reg   = 1'b1;
        OP_READ_TOC: sel_toc   = 1'b1;
        OP_READBACK: sel_rb    = 1'b1;
        default: ;
      endcase
    end
    miso_oe = enable && (sel_reg || sel_toc || sel_rb);
  end

endmodule
