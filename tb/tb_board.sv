// tb_board: two chips on one board sharing an SPI bus.
//
// As on the laboratory's circuit board, the microcontroller drives sck,
// mosi and reset to every chip and gives each chip its own enable; all
// chips share miso, each driving it only while its miso_oe is high. The
// test configures each chip differently through the shared bus, checks
// that a frame reaches only the selected chip, that reads return the
// selected chip's data, and that the two chips never drive miso together.
module tb_board;
  import panic_pkg::*;

  localparam int HALF = 5;

  int   checks = 0, failures = 0;
  logic reset = 0;
  logic sck = 0, mosi = 0;
  logic en [2] = '{1'b1, 1'b1};
  logic miso_c [2], oe [2];
  logic miso;
  mv_t  ain [4];
  mv_t  aout [2][4];
  logic drv [2][4];
  logic [7:0] bgc [2];
  int   n_both = 0;

  for (genvar c = 0; c < 2; c++) begin : g_chip
    panic_top u_chip (
      .sck, .reset, .enable(en[c]), .mosi, .miso(miso_c[c]), .miso_oe(oe[c]),
      .ain, .aout(aout[c]), .aout_driven(drv[c]), .bg_vout(16'd1200 + 16'(c)), .bg_ctrl(bgc[c])
    );
  end

  // shared miso line: the driving chip wins, pulled low when none drives
  assign miso = oe[0] ? miso_c[0] : (oe[1] ? miso_c[1] : 1'b0);
  always @(posedge sck) if (oe[0] && oe[1]) n_both++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic frame(input int c, input logic [7:0] instr, input logic [7:0] data, output logic [7:0] rd);
    logic [15:0] word;
    word = {instr, data};
    rd = '0;
    en[c] = 1'b1;
    #(HALF);
    for (int b = 15; b >= 0; b--) begin
      mosi = word[b];
      #(HALF);
      sck = 1'b1;
      if (b < 8) rd[b] = miso;
      #(HALF);
      sck = 1'b0;
    end
    #(HALF);
    en[c] = 1'b0;
    #(HALF);
  endtask

  task automatic wr(input int c, input int m, input int l, input logic [7:0] d);
    logic [7:0] r;
    frame(c, {3'd1, 1'b0, 4'(m)}, 8'(l), r);
    frame(c, {3'd2, 5'd0}, d, r);
  endtask

  task automatic rd(input int c, input int m, input int l, output logic [7:0] d);
    logic [7:0] r;
    frame(c, {3'd1, 1'b0, 4'(m)}, 8'(l), r);
    frame(c, {3'd3, 5'd0}, 8'h00, d);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r;
    foreach (ain[k]) ain[k] = mv_t'(500 * (k + 1));
    #1 en[0] = 1'b0; en[1] = 1'b0;
    #2 reset = 1;
    #10 reset = 0;
    // chip 0: DAC 0 code 100 to pin 0; chip 1: DAC 1 code 200 to pin 3
    wr(0, MOD_DAC0, 7, 8'd100);
    wr(0, MOD_DAC0, 5, 8'h04);
    wr(1, MOD_DAC1, 7, 8'd200);
    wr(1, MOD_DAC1, 5, 8'h07);
    #1;
    check(drv[0][0] && aout[0][0] == 16'd1000, "chip 0 DAC on pin 0");
    check(drv[1][3] && aout[1][3] == 16'd2000, "chip 1 DAC on pin 3");
    check(!drv[1][0] && !drv[0][3], "each frame reached only its chip");
    // different IRS settings, read back through the shared miso
    wr(0, MOD_SH, 0, 8'h5A);
    wr(1, MOD_SH, 0, 8'hC3);
    rd(0, MOD_SH, 0, r);
    check(r == 8'h5A, $sformatf("chip 0 IRS read %h", r));
    rd(1, MOD_SH, 0, r);
    check(r == 8'hC3, $sformatf("chip 1 IRS read %h", r));
    wr(0, MOD_BG, 7, 8'h11);
    wr(1, MOD_BG, 7, 8'h22);
    check(bgc[0] == 8'h11 && bgc[1] == 8'h22, "module registers per chip");
    // both chips answer the table of content
    frame(1, {3'd4, 1'b0, 4'(MOD_COMP)}, 8'h00, r);
    check(r == TAG_DIFFCOMP, "chip 1 table of content");
    check(n_both == 0, "never two drivers on miso");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
