// panic_top: programmable analog integrated circuit (six analog modules).
//
// A chip of analog cells whose connections are chosen by configuration:
// a microcontroller writes, over SPI, which of the signals wired to each
// cell input are switched in and which off-chip output each cell output
// drives, and so builds a circuit from the cells. The chip holds the control
// logic and six analog modules, each an analog cell inside an analog module
// framework (AMF):
//   module 0  DAC                  module 3  differential comparator
//   module 1  DAC                  module 4  differential OTA
//   module 2  sample & hold        module 5  bandgap reference
// Software finds the cells by their table-of-content tags and the possible
// connections by ReadBack, so it needs no built-in knowledge of the chip.
//
// Pins: enable, reset, sck, mosi, miso as on the board, plus miso_oe (miso
// is driven only then, so chips can share it); ain[4] and aout[4] are the
// four analog inputs and outputs, carried as millivolt numbers, with
// aout_driven low where no ORS is connected to a pin. The bandgap cell is
// not modelled: its output comes in on bg_vout and its module register
// leaves on bg_ctrl.
//
// All logic runs on sck (see control). The analog side is made of
// behavioural models and is combinational, apart from the sample & hold's
// latch; WIRING is the layout's fixed connection of signals to IRS inputs,
// which the IRS cells report by ReadBack. Because wiring may take a cell's
// output back to an input of the same or an earlier cell (feedback, as in
// analog circuits), the analog network contains combinational paths that
// lint reports as loops; they settle because the models are monotone and
// switches are only closed by configuration.
module panic_top
  import panic_pkg::*;
#(
  parameter chip_src_t   WIRING  = PROTO_WIRING,
  parameter int unsigned VREF_MV = 2560
) (
  input  logic       sck,
  input  logic       reset,
  input  logic       enable,
  input  logic       mosi,
  output logic       miso,
  output logic       miso_oe,
  input  mv_t        ain         [N_AIN],
  output mv_t        aout        [N_AOUT],
  output logic       aout_driven [N_AOUT],
  input  mv_t        bg_vout,
  output logic [7:0] bg_ctrl
);

  localparam int unsigned NM = PROTO_MODULES;

  // control bus
  logic [NM-1:0] mod_sel;
  logic [2:0]    line, rb_idx;
  logic          we;
  logic [7:0]    wdata;
  logic [7:0]    mod_rdata [NM];
  src_t          mod_rb    [NM];

  // analog-side signals of every module
  logic [7:0] irs_sw     [NM][MAX_IRS];
  logic [3:0] ors_pin_sw [NM][N_ORS];
  logic [7:0] mreg_dout  [NM];
  logic [7:0] mreg_din   [NM];
  mv_t        irs_src    [NM][MAX_IRS][IRS_INPUTS];
  mv_t        irs_node   [NM][MAX_IRS];
  mv_t        ors_v      [NM][N_ORS];

  control #(.N_MODULES(NM)) u_control (
    .sck, .reset, .enable, .mosi, .miso, .miso_oe,
    .mod_sel, .line, .we, .wdata, .rb_idx, .mod_rdata, .mod_rb
  );

  for (genvar m = 0; m < int'(NM); m++) begin : g_mod
    amf #(.N_IRS(MAX_IRS), .SRC(WIRING[m])) u_amf (
      .clk(sck), .reset, .sel(mod_sel[m]), .line, .we, .wdata,
      .rdata(mod_rdata[m]), .rb_idx, .rb_data(mod_rb[m]),
      .irs_sw(irs_sw[m]), .ors_pin_sw(ors_pin_sw[m]),
      .mreg_dout(mreg_dout[m]), .mreg_din(mreg_din[m])
    );

    // fixed layout wiring of each IRS input
    for (genvar i = 0; i < int'(MAX_IRS); i++) begin : g_irs
      for (genvar j = 0; j < int'(IRS_INPUTS); j++) begin : g_in
        localparam src_t S = WIRING[m][i][j];
        if (src_is_ain(S)) begin : g_ain
          assign irs_src[m][i][j] = ain[S[1:0]];
        end else if (src_is_ors(S) && 32'(S[5:2]) < NM) begin : g_ors
          assign irs_src[m][i][j] = ors_v[int'(S[5:2])][int'(S[0])];
        end else begin : g_none
          assign irs_src[m][i][j] = '0;
        end
      end
      analog_switch #(.N(IRS_INPUTS)) u_sw (
        .src(irs_src[m][i]), .close(irs_sw[m][i]),
        .node(irs_node[m][i]), .driven()
      );
    end
  end

  // analog cells
  dac_model #(.VREF_MV(VREF_MV)) u_dac0 (.code(mreg_dout[MOD_DAC0]), .vout(ors_v[MOD_DAC0][0]));
  dac_model #(.VREF_MV(VREF_MV)) u_dac1 (.code(mreg_dout[MOD_DAC1]), .vout(ors_v[MOD_DAC1][0]));
  assign ors_v[MOD_DAC0][1] = '0;
  assign ors_v[MOD_DAC1][1] = '0;
  assign mreg_din[MOD_DAC0] = '0;
  assign mreg_din[MOD_DAC1] = '0;

  sample_hold_model u_sh (
    .track(mreg_dout[MOD_SH][0]), .vin(irs_node[MOD_SH][0]), .vout(ors_v[MOD_SH][0])
  );
  assign ors_v[MOD_SH][1] = '0;
  assign mreg_din[MOD_SH] = '0;

  logic comp_out;
  comparator_model u_comp (
    .vp(irs_node[MOD_COMP][0]), .vn(irs_node[MOD_COMP][1]), .out(comp_out)
  );
  assign ors_v[MOD_COMP][0] = '0;
  assign ors_v[MOD_COMP][1] = '0;
  assign mreg_din[MOD_COMP] = {7'b0, comp_out};

  ota_model u_ota (
    .vp(irs_node[MOD_OTA][0]), .vn(irs_node[MOD_OTA][1]),
    .outp(ors_v[MOD_OTA][0]), .outn(ors_v[MOD_OTA][1])
  );
  assign mreg_din[MOD_OTA] = '0;

  assign ors_v[MOD_BG][0] = bg_vout;
  assign ors_v[MOD_BG][1] = '0;
  assign mreg_din[MOD_BG] = '0;
  assign bg_ctrl          = mreg_dout[MOD_BG];

  // off-chip analog outputs: every ORS can reach every pin
  for (genvar p = 0; p < int'(N_AOUT); p++) begin : g_aout
    mv_t              pin_src   [NM*N_ORS];
    logic [NM*N_ORS-1:0] pin_close;
    for (genvar m = 0; m < int'(NM); m++) begin : g_m
      for (genvar o = 0; o < int'(N_ORS); o++) begin : g_o
        assign pin_src[m*N_ORS+o]   = ors_v[m][o];
        assign pin_close[m*N_ORS+o] = ors_pin_sw[m][o][p];
      end
    end
    analog_switch #(.N(NM*N_ORS)) u_pin (
      .src(pin_src), .close(pin_close), .node(aout[p]), .driven(aout_driven[p])
    );
  end

endmodule
