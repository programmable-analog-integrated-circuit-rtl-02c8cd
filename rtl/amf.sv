// amf: analog module framework, digital part.
//
// The framework wraps one analog cell and makes it programmable. It holds
// N_IRS input register & switch cells (up to 5), two output register &
// switch cells, a module register and a line decoder. The control block
// addresses it with a module select and a line address; the line decoder
// enables one register, which is written on the rising clk edge when we is
// high. rdata returns the addressed register (for the module register: the
// cell's digital outputs), and rb_data the ReadBack entry rb_idx of the
// addressed IRS, both combinationally; they are zero for a line that holds
// no IRS (rb_data) or no register (rdata).
//
// Outputs to the analog side: irs_sw[i][j] closes input j of IRS i,
// ors_pin_sw[o][p] connects ORS o to off-chip output p, mreg_dout drives the
// cell. SRC is the ReadBack table of this module's IRS cells, fixed by the
// layout. The make-up of the framework follows the chip's description; the
// register map is this design's choice.
module amf
  import panic_pkg::*;
#(
  parameter int unsigned N_IRS = 5,
  parameter amf_src_t    SRC   = '0
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       sel,
  input  logic [2:0] line,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  input  logic [2:0] rb_idx,
  output src_t       rb_data,
  output logic [7:0] irs_sw     [N_IRS],
  output logic [3:0] ors_pin_sw [N_ORS],
  output logic [7:0] mreg_dout,
  input  logic [7:0] mreg_din
);

  logic [N_IRS-1:0] irs_en;
  logic [1:0]       ors_en;
  logic             mreg_en;
  src_t             irs_rb    [N_IRS];
  logic [7:0]       ors_rdata [N_ORS];
  logic [7:0]       mreg_rdata;

  line_decoder #(.N_IRS(N_IRS)) u_line_dec (
    .sel, .line, .irs_en, .ors_en, .mreg_en
  );

  for (genvar i = 0; i < int'(N_IRS); i++) begin : g_irs
    irs #(.SRC(SRC[i])) u_irs (
      .clk, .reset, .en(irs_en[i]), .we, .wdata,
      .sw(irs_sw[i]), .rb_idx, .rb_data(irs_rb[i])
    );
  end

  for (genvar o = 0; o < int'(N_ORS); o++) begin : g_ors
    ors u_ors (
      .clk, .reset, .en(ors_en[o]), .we, .wdata,
      .rdata(ors_rdata[o]), .pin_sw(ors_pin_sw[o])
    );
  end

  module_reg u_mreg (
    .clk, .reset, .en(mreg_en), .we, .wdata,
    .dout(mreg_dout), .din(mreg_din), .rdata(mreg_rdata)
  );

  always_comb begin
    rdata   = '0;
    rb_data = SRC_NONE;
    for (int unsigned i = 0; i < N_IRS; i++)
      if (line == 3'(i)) begin
        rdata   = irs_sw[i];
        rb_data = irs_rb[i];
      end
    if (line == LINE_ORS0) rdata = ors_rdata[0];
    if (line == LINE_ORS1) rdata = ors_rdata[1];
    if (line == LINE_MREG) rdata = mreg_rdata;
  end

endmodule
