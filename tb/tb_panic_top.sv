// tb_panic_top: end-to-end test of the whole chip at its default parameters.
//
// The testbench plays the microcontroller of the remote laboratory. It
//   1. reads the table of content and finds the cells by their tags,
//   2. reads every ReadBack entry of every IRS and checks it against the
//      wiring rule, and finds the comparator inputs that reach the sample &
//      hold and the DAC,
//   3. builds the successive approximation converter (sample & hold and DAC
//      into the comparator) and converts a set of input voltages with an
//      8-step binary search, checking each code against the ideal one and
//      that each conversion takes exactly 8 comparisons,
//   4. routes cell outputs to the off-chip pins through the ORS cells (the
//      OTA as a differential amplifier, the sample & hold, the bandgap),
//   5. exercises several closed switches on one IRS, an unbuilt module
//      address, a frame cut short by enable, frames back to back in one
//      selection, and reset.
// Each of these mechanisms is counted; one that never happened is a failure.
module tb_panic_top;
  import panic_pkg::*;

  int checks = 0, failures = 0;
  logic reset = 0, miso_oe;
  mv_t  ain [4];
  mv_t  aout [4];
  logic aout_driven [4];
  mv_t  bg_vout = 16'd1205;
  logic [7:0] bg_ctrl;

  spi_bfm spi ();

  panic_top dut (
    .sck(spi.sck), .reset, .enable(spi.enable), .mosi(spi.mosi), .miso(spi.miso), .miso_oe,
    .ain, .aout, .aout_driven, .bg_vout, .bg_ctrl
  );

  // mechanism counters
  int n_toc = 0, n_readback = 0, n_write = 0, n_read = 0, n_conv = 0, n_pin = 0;
  int n_multi = 0, n_unbuilt = 0, n_abort = 0, n_b2b = 0, n_reset = 0, n_shared_miso = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // --- microcontroller operations -------------------------------------------
  task automatic set_addr(input int m, input int l);
    logic [7:0] r;
    spi.frame({3'd1, 1'b0, 4'(m)}, 8'(l), r);
  endtask

  task automatic wr(input int m, input int l, input logic [7:0] d);
    logic [7:0] r;
    set_addr(m, l);
    spi.frame({3'd2, 5'd0}, d, r);
    n_write++;
  endtask

  task automatic rd(input int m, input int l, output logic [7:0] d);
    set_addr(m, l);
    spi.frame({3'd3, 5'd0}, 8'h00, d);
    n_read++;
  endtask

  task automatic toc(input int m, output logic [7:0] t);
    spi.frame({3'd4, 1'b0, 4'(m)}, 8'h00, t);
    n_toc++;
  endtask

  task automatic readback(input int m, input int i, input int j, output logic [7:0] s);
    set_addr(m, i);
    spi.frame({3'd5, 2'b0, 3'(j)}, 8'h00, s);
    n_readback++;
  endtask

  // miso must be driven only during the data byte of read instructions
  logic rd_frame = 0;
  always @(posedge spi.sck) if (miso_oe) begin
    n_shared_miso++;
    if (!rd_frame) begin
      failures++;
      $display("FAIL miso driven outside a read");
    end
  end

  // wiring rule of the prototype, written out independently of the package
  function automatic logic [7:0] expected_src(int m, int i, int j);
    int src_m;
    if (j < 4) return 8'h40 | 8'(j);
    src_m = m - 1 - i - (j - 4);
    while (src_m < 0) src_m += 6;
    return 8'h80 | 8'(src_m << 2);
  endfunction

  // ideal 8-bit result of the binary search: the largest code whose DAC
  // voltage (10 mV per step) is below the input
  function automatic int ideal_code(int mv);
    int c;
    c = 0;
    for (int k = 0; k < 256; k++) if (k * 10 < mv) c = k;
    return c;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] t, s, r;
    logic [15:0] rx;
    int dac_m, sh_m, comp_m, ota_m, bg_m;
    int sh_in, dac_in, code, comparisons;
    int vin_list [10] = '{0, 5, 10, 11, 777, 1234, 1280, 2000, 2545, 3000};

    foreach (ain[k]) ain[k] = '0;
    #2 reset = 1;
    #20 reset = 0;
    n_reset++;
    rd_frame = 0;

    // 1. table of content
    dac_m = -1; sh_m = -1; comp_m = -1; ota_m = -1; bg_m = -1;
    rd_frame = 1;
    for (int m = 0; m < 16; m++) begin
      toc(m, t);
      if (t == 8'h01 && dac_m < 0) dac_m = m;
      if (t == 8'h02) sh_m = m;
      if (t == 8'h03) comp_m = m;
      if (t == 8'h04) ota_m = m;
      if (t == 8'h05) bg_m = m;
      if (m >= 6) check(t == 8'h00, $sformatf("toc %0d empty", m));
    end
    check(dac_m == 0 && sh_m == 2 && comp_m == 3 && ota_m == 4 && bg_m == 5, "cells found by tag");

    // 2. ReadBack of every IRS input of the chip
    for (int m = 0; m < 6; m++)
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 8; j++) begin
          readback(m, i, j, s);
          check(s == expected_src(m, i, j), $sformatf("readback m%0d irs%0d in%0d = %h", m, i, j, s));
        end
    // unbuilt module reads nothing
    readback(9, 0, 0, s);
    check(s == 8'h00, "readback of unbuilt module");
    sh_in = -1; dac_in = -1;
    for (int j = 0; j < 8; j++) begin
      readback(comp_m, 0, j, s);
      if (s == (8'h80 | 8'(sh_m << 2))) sh_in = j;
      readback(comp_m, 1, j, s);
      if (s == (8'h80 | 8'(dac_m << 2))) dac_in = j;
    end
    check(sh_in >= 0 && dac_in >= 0, "converter connections available");
    rd_frame = 0;

    // 3. successive approximation converter
    wr(sh_m, 0, 8'h01);                       // S&H input from ain[0]
    wr(comp_m, 0, 8'(1 << sh_in));            // comparator + from S&H
    wr(comp_m, 1, 8'(1 << dac_in));           // comparator - from DAC
    foreach (vin_list[n]) begin
      ain[0] = mv_t'(vin_list[n]);
      wr(sh_m, 7, 8'h01);                     // track
      wr(sh_m, 7, 8'h00);                     // hold
      ain[0] = mv_t'($urandom_range(0, 3300)); // input moves: the held value must not
      code = 0;
      comparisons = 0;
      for (int b = 7; b >= 0; b--) begin
        code = code | (1 << b);
        wr(dac_m, 7, 8'(code));
        rd_frame = 1;
        rd(comp_m, 7, r);
        rd_frame = 0;
        comparisons++;
        if (r[0] == 1'b0) code = code & ~(1 << b);
      end
      n_conv++;
      check(comparisons == 8, "8 comparisons per conversion");
      check(code == ideal_code(vin_list[n]),
            $sformatf("conversion of %0d mV gave %0d, ideal %0d", vin_list[n], code, ideal_code(vin_list[n])));
    end

    // 4. routing to the off-chip pins
    wr(sh_m, 5, 8'h06);                       // S&H ORS0 -> pin 2
    #1;
    check(aout_driven[2] && aout[2] == mv_t'(3000), $sformatf("S&H on pin 2: %0d", aout[2]));
    n_pin++;
    ain[1] = 16'd1500; ain[2] = 16'd1499;
    wr(ota_m, 0, 8'h02);                      // OTA + from ain[1]
    wr(ota_m, 1, 8'h04);                      // OTA - from ain[2]
    wr(ota_m, 5, 8'h04);                      // ORS0 -> pin 0
    wr(ota_m, 6, 8'h05);                      // ORS1 -> pin 1
    #1;
    check(aout_driven[0] && aout[0] == 16'd2650, $sformatf("OTA outp %0d", aout[0]));
    check(aout_driven[1] && aout[1] == 16'd650, $sformatf("OTA outn %0d", aout[1]));
    n_pin++;
    ain[2] = 16'd1400;                        // large difference: outputs clip
    #1;
    check(aout[0] == 16'd3300 && aout[1] == 16'd0, "OTA clipping");
    wr(bg_m, 5, 8'h07);                       // bandgap ORS0 -> pin 3
    wr(bg_m, 7, 8'h3C);
    #1;
    check(aout_driven[3] && aout[3] == bg_vout && bg_ctrl == 8'h3C, "bandgap on pin 3");
    n_pin++;
    rd_frame = 1;
    rd(ota_m, 5, r);
    check(r == 8'h04, "ORS register reads back");
    rd_frame = 0;
    wr(ota_m, 5, 8'h00);                      // disconnect
    #1;
    check(!aout_driven[0], "pin 0 released");
    wr(sh_m, 5, 8'h04);                       // S&H and OTA outp both onto pin 0
    wr(ota_m, 5, 8'h04);
    ain[2] = 16'd1500;                        // OTA outp at common mode 1650
    #1;
    check(aout[0] == mv_t'((3000 + 1650) / 2), $sformatf("two ORS on one pin: %0d", aout[0]));

    // 5a. several switches closed on one IRS: S&H input = mean of ain0, ain1
    ain[0] = 16'd1000; ain[1] = 16'd2000;
    wr(ota_m, 5, 8'h00);
    wr(sh_m, 5, 8'h06);                       // S&H back on pin 2 alone
    wr(sh_m, 0, 8'h03);
    wr(sh_m, 7, 8'h01);
    #1;
    check(aout[2] == 16'd1500, $sformatf("mean of two inputs %0d", aout[2]));
    n_multi++;

    // 5b. unbuilt module: write lost, read zero, built modules untouched
    wr(12, 7, 8'hFF);
    rd_frame = 1;
    rd(12, 7, r);
    check(r == 8'h00, "read of unbuilt module");
    rd(sh_m, 0, r);
    check(r == 8'h03, "built module untouched");
    rd_frame = 0;
    n_unbuilt++;

    // 5c. frame cut short: set address to OTA line 0, then a write of 8'hFF
    //     that stops after 12 bits must not land
    set_addr(ota_m, 0);
    spi.select();
    spi.bits({3'd2, 5'd0, 8'hFF}, 12, rx);
    spi.deselect();
    rd_frame = 1;
    rd(ota_m, 0, r);
    rd_frame = 0;
    check(r == 8'h02, $sformatf("aborted write ignored, reg %h", r));
    n_abort++;

    // 5d. back-to-back frames in one selection: set address, write, read
    spi.select();
    spi.xfer({3'd1, 1'b0, 4'(dac_m)}, 8'd7, r);
    spi.xfer({3'd2, 5'd0}, 8'hA5, r);
    rd_frame = 1;
    spi.xfer({3'd3, 5'd0}, 8'h00, r);   // DAC's module register reads its digital inputs (none)
    spi.xfer({3'd4, 1'b0, 4'(comp_m)}, 8'h00, r);
    rd_frame = 0;
    spi.deselect();
    check(r == 8'h03, "back-to-back toc read");
    wr(dac_m, 5, 8'h04);                      // DAC onto pin 0: code A5 is 1650 mV
    #1;
    check(aout_driven[0] && aout[0] == 16'd1650, $sformatf("back-to-back write, DAC %0d", aout[0]));
    n_b2b++;

    // 5e. reset opens every switch
    reset = 1;
    #5 reset = 0;
    n_reset++;
    #1;
    check(!aout_driven[0] && !aout_driven[1] && !aout_driven[2] && !aout_driven[3], "reset releases pins");
    rd_frame = 1;
    rd(sh_m, 0, r);
    rd_frame = 0;
    check(r == 8'h00, "reset clears IRS");

    // every mechanism must have happened
    check(n_toc > 0, "table of content used");
    check(n_readback > 0, "ReadBack used");
    check(n_write > 0 && n_read > 0, "register write and read used");
    check(n_conv == 10, "conversions done");
    check(n_pin > 0, "ORS pin routing used");
    check(n_multi > 0, "several switches on one IRS");
    check(n_unbuilt > 0, "unbuilt module address used");
    check(n_abort > 0, "aborted frame");
    check(n_b2b > 0, "back-to-back frames");
    check(n_reset > 1, "reset");
    check(n_shared_miso > 0, "miso driven by reads");
    $display("mechanisms: toc=%0d readback=%0d write=%0d read=%0d conversions=%0d pin=%0d multi=%0d unbuilt=%0d abort=%0d b2b=%0d reset=%0d",
             n_toc, n_readback, n_write, n_read, n_conv, n_pin, n_multi, n_unbuilt, n_abort, n_b2b, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
