// panic_pkg: types and constants shared by the programmable analog chip.
//
// The chip is configured over SPI with 16-bit frames: an instruction byte
// followed by a data byte, most significant bit first. The instruction
// byte carries a 3-bit opcode in bits [7:5] and a 5-bit operand in [4:0].
// The frame format, the opcode values, the source codes used by ReadBack
// and the voltage representation of the behavioural analog models are this
// design's own choices; the numbers of modules, IRS and ORS cells, switch
// inputs and off-chip pins follow the chip's description.
package panic_pkg;

  // Architecture sizes
  localparam int unsigned MAX_MODULES = 16;  // addressable analog modules
  localparam int unsigned PROTO_MODULES = 6; // modules in the prototype
  localparam int unsigned MAX_IRS     = 5;   // IRS cells per AMF (at most)
  localparam int unsigned N_ORS       = 2;   // ORS cells per AMF
  localparam int unsigned IRS_INPUTS  = 8;   // signals one IRS can switch
  localparam int unsigned N_AIN       = 4;   // off-chip analog inputs
  localparam int unsigned N_AOUT      = 4;   // off-chip analog outputs
  localparam int unsigned N_LINES     = 8;   // registers per AMF (5 IRS, 2 ORS, 1 module reg)

  // Line addresses inside one AMF
  localparam logic [2:0] LINE_ORS0 = 3'd5;
  localparam logic [2:0] LINE_ORS1 = 3'd6;
  localparam logic [2:0] LINE_MREG = 3'd7;

  // Instruction opcodes (bits [7:5] of the instruction byte)
  typedef enum logic [2:0] {
    OP_NOP      = 3'd0,  // nothing
    OP_SET_ADDR = 3'd1,  // operand[3:0] = module, data[2:0] = line
    OP_WRITE    = 3'd2,  // data byte -> addressed register
    OP_READ     = 3'd3,  // addressed register -> MISO during data byte
    OP_READ_TOC = 3'd4,  // operand[3:0] = module, its tag -> MISO
    OP_READBACK = 3'd5   // operand[2:0] = input of addressed IRS, its source -> MISO
  } opcode_e;

  // Identification tags held in the table of content
  localparam logic [7:0] TAG_NONE       = 8'h00;
  localparam logic [7:0] TAG_DAC        = 8'h01;
  localparam logic [7:0] TAG_SAMPLEHOLD = 8'h02;
  localparam logic [7:0] TAG_DIFFCOMP   = 8'h03;
  localparam logic [7:0] TAG_DIFFOTA    = 8'h04;
  localparam logic [7:0] TAG_BANDGAP    = 8'h05;

  // Module addresses of the prototype's cells
  localparam int unsigned MOD_DAC0 = 0;
  localparam int unsigned MOD_DAC1 = 1;
  localparam int unsigned MOD_SH = 2;
  localparam int unsigned MOD_COMP = 3;
  localparam int unsigned MOD_OTA = 4;
  localparam int unsigned MOD_BG = 5;

  typedef logic [7:0] tag_t;
  typedef tag_t [MAX_MODULES-1:0] toc_t;

  localparam toc_t PROTO_TOC = toc_t'({
      {10{TAG_NONE}},
      TAG_BANDGAP, TAG_DIFFOTA, TAG_DIFFCOMP, TAG_SAMPLEHOLD, TAG_DAC, TAG_DAC});

  // ReadBack source code of one IRS input: which signal the layout wired to it.
  //   8'h00           no signal
  //   8'b01_0000_ii   off-chip analog input ii
  //   8'b10_mmmm_0o   ORS o of module mmmm
  typedef logic [7:0] src_t;
  typedef src_t [IRS_INPUTS-1:0] irs_src_t;
  typedef irs_src_t [MAX_IRS-1:0] amf_src_t;
  typedef amf_src_t [PROTO_MODULES-1:0] chip_src_t;

  localparam src_t SRC_NONE = 8'h00;

  function automatic src_t src_ain(int unsigned pin);
    return src_t'({2'b01, 4'b0000, 2'(pin)});
  endfunction

  function automatic src_t src_ors(int unsigned module_addr, int unsigned ors_idx);
    return src_t'({2'b10, 4'(module_addr), 1'b0, 1'(ors_idx)});
  endfunction

  function automatic logic src_is_ain(src_t s);
    return s[7:6] == 2'b01;
  endfunction

  function automatic logic src_is_ors(src_t s);
    return s[7:6] == 2'b10;
  endfunction

  // Wiring of the prototype: inputs 0..3 of every IRS reach the four
  // off-chip analog inputs; input 4+k of IRS i of module m reaches ORS 0 of
  // module (m - 1 - i - k) mod 6. This puts the sample & hold on input 4 of
  // the comparator's IRS 0 and the first DAC on input 5 of its IRS 1, the
  // two connections of the successive approximation converter.
  function automatic chip_src_t proto_wiring();
    chip_src_t w;
    for (int m = 0; m < int'(PROTO_MODULES); m++)
      for (int i = 0; i < int'(MAX_IRS); i++)
        for (int j = 0; j < int'(IRS_INPUTS); j++)
          if (j < int'(N_AIN))
            w[m][i][j] = src_ain(j);
          else
            w[m][i][j] = src_ors((m - 1 - i - (j - 4) + 12) % int'(PROTO_MODULES), 0);
    return w;
  endfunction

  localparam chip_src_t PROTO_WIRING = proto_wiring();

  // Analog voltages in the behavioural models: unsigned millivolts.
  typedef logic [15:0] mv_t;

endpackage
