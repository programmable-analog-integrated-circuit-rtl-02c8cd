// spi_bfm: SPI master used by the testbenches, playing the microcontroller.
//
// Sends 16-bit frames in SPI mode 0, MSB first, half period HALF ns: mosi is
// set while sck is low, miso is sampled on the rising edge. xfer sends one
// frame and returns the byte received during the data byte; select/deselect
// move enable, so several frames can share one selection. sck rising edges
// are counted in edges.
interface spi_bfm #(parameter int HALF = 5);
  logic sck    = 1'b0;
  logic enable = 1'b1;
  logic mosi   = 1'b0;
  logic miso;
  int   edges  = 0;

  // start deselected with a falling edge, so that the slave's asynchronous
  // frame clear sees an edge in a two-state simulation
  initial #1 enable = 1'b0;

  task automatic select();
    enable = 1'b1;
    #(HALF);
  endtask

  task automatic deselect();
    #(HALF);
    enable = 1'b0;
    #(HALF);
  endtask

  // send n bits of word, MSB first; the bits read on miso come back in rx
  task automatic bits(input logic [15:0] word, input int n, output logic [15:0] rx);
    rx = '0;
    for (int b = n - 1; b >= 0; b--) begin
      mosi = word[b];
      #(HALF);
      sck = 1'b1;
      edges++;
      rx[b] = miso;
      #(HALF);
      sck = 1'b0;
    end
  endtask

  task automatic xfer(input logic [7:0] instr, input logic [7:0] data, output logic [7:0] rdata);
    logic [15:0] rx;
    bits({instr, data}, 16, rx);
    rdata = rx[7:0];
  endtask

  // one frame in its own selection
  task automatic frame(input logic [7:0] instr, input logic [7:0] data, output logic [7:0] rdata);
    select();
    xfer(instr, data, rdata);
    deselect();
  endtask
endinterface
