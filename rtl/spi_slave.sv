// spi_slave: serial peripheral interface of the chip.
//
// The chip has no clock of its own: the serial clock sck clocks all of its
// logic. A frame is 16 bits, most significant bit first, SPI mode 0: the
// master changes mosi while sck is low and samples miso on the rising edge;
// this block samples mosi on the rising edge and changes miso on the falling
// edge. The first byte is the instruction, the second the data byte.
//
//   instr / instr_valid : the instruction byte, held from the 8th rising edge
//                         until the end of the frame
//   last_bit            : high while the 16th bit is on mosi; the rising edge
//                         that samples it completes the frame, and logic on
//                         sck uses last_bit as its write strobe on that edge
//   rx_data             : the data byte, valid while last_bit is high
//   tx_byte             : byte to send; captured on the falling edge after
//                         the 8th rising edge and shifted out on miso during
//                         the data byte
//
// Frames may follow each other with enable held high. enable low (chip not
// selected) or reset high clears the bit counter at once. The chip's pins
// (enable, reset, sck, mosi, miso) follow the board drawing; their polarity
// (both active high), the SPI mode and the frame length are this design's
// choices.
module spi_slave (
  input  logic       sck,
  input  logic       reset,
  input  logic       enable,
  input  logic       mosi,
  output logic       miso,
  output logic [7:0] instr,
  output logic       instr_valid,
  output logic       last_bit,
  output logic [7:0] rx_data,
  input  logic [7:0] tx_byte
);

  logic [3:0] cnt;     // bits received in this frame
  logic [7:0] rx_sh;
  logic [7:0] tx_sh;
  logic       frame_clr;   // asynchronous clear of the frame state

  assign frame_clr = reset || !enable;

  always_ff @(posedge sck or posedge frame_clr) begin
    if (frame_clr) begin
      cnt   <= '0;
      rx_sh <= '0;
      instr <= '0;
    end else begin
      rx_sh <= {rx_sh[6:0], mosi};
      cnt   <= cnt + 4'd1;            // wraps from 15 to 0 at the end of a frame
      if (cnt == 4'd7) instr <= {rx_sh[6:0], mosi};
    end
  end

  always_ff @(negedge sck or posedge reset) begin
    if (reset) begin
      tx_sh <= '0;
    end else if (cnt == 4'd8) begin
      tx_sh <= tx_byte;
    end else if (cnt > 4'd8) begin
      tx_sh <= {tx_sh[6:0], 1'b0};
    end
  end

  assign miso        = tx_sh[7];
  assign instr_valid = cnt[3];
  assign last_bit    = (cnt == 4'd15);
  assign rx_data     = {rx_sh[6:0], mosi};

endmodule
