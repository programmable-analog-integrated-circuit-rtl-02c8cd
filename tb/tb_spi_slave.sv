// tb_spi_slave: checks the SPI slave frame by frame.
//
// Sends frames with random instruction and data bytes and checks, at the
// rising edge that ends each frame, that instr, rx_data and last_bit are
// right, that instr_valid rises after the 8th bit, and that the byte offered
// on tx_byte comes back on miso during the data byte. Also checks frames sent
// back to back under one selection, a frame cut short by enable, and reset.
module tb_spi_slave;
  import panic_pkg::*;

  int checks = 0, failures = 0;
  logic reset;
  logic [7:0] instr, rx_data, tx_byte;
  logic instr_valid, last_bit;

  spi_bfm spi ();

  spi_slave dut (
    .sck(spi.sck), .reset, .enable(spi.enable), .mosi(spi.mosi), .miso(spi.miso),
    .instr, .instr_valid, .last_bit, .rx_data, .tx_byte
  );

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // snoop the completing edge
  logic [7:0] seen_instr, seen_data;
  int         frames_done = 0;
  always @(posedge spi.sck) if (last_bit) begin
    seen_instr = instr;
    seen_data  = rx_data;
    frames_done++;
  end

  // instr_valid must be high exactly from the 8th edge until the frame ends
  always @(negedge spi.sck) if (spi.enable) begin
    checks++;
    if (instr_valid !== ((spi.edges % 16) >= 8)) begin
      failures++;
      $display("FAIL instr_valid after %0d edges", spi.edges);
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] i, d, r;
    logic [15:0] rx;
    reset = 1'b0;
    tx_byte = '0;
    #1 reset = 1'b1;
    #20 reset = 1'b0;
    #10;
    for (int n = 0; n < 40; n++) begin
      i = 8'($urandom); d = 8'($urandom); tx_byte = 8'($urandom);
      spi.edges = 0;
      spi.frame(i, d, r);
      check(seen_instr == i, $sformatf("instr %h seen %h", i, seen_instr));
      check(seen_data == d, $sformatf("data %h seen %h", d, seen_data));
      check(r == tx_byte, $sformatf("miso %h expected %h", r, tx_byte));
    end
    // back to back frames in one selection
    spi.edges = 0;
    spi.select();
    for (int n = 0; n < 5; n++) begin
      i = 8'($urandom); d = 8'($urandom); tx_byte = 8'($urandom);
      spi.xfer(i, d, r);
      check(seen_instr == i && seen_data == d, "back-to-back frame");
      check(r == tx_byte, "back-to-back miso");
    end
    spi.deselect();
    check(frames_done == 45, $sformatf("frames completed %0d", frames_done));
    // frame cut short after 11 bits: nothing completes, next frame is aligned
    spi.edges = 0;
    spi.select();
    spi.bits(16'hFFFF, 11, rx);
    spi.deselect();
    check(frames_done == 45, "aborted frame must not complete");
    check(instr_valid == 1'b0, "counter cleared by enable");
    spi.edges = 0;
    spi.frame(8'h5A, 8'hC3, r);
    check(seen_instr == 8'h5A && seen_data == 8'hC3, "frame after abort");
    // reset clears the frame state
    spi.edges = 0;
    spi.select();
    spi.bits(16'hFFFF, 9, rx);
    reset = 1'b1;
    #3;
    check(instr_valid == 1'b0 && instr == 8'h00, "reset clears");
    reset = 1'b0;
    spi.deselect();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
