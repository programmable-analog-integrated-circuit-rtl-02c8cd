// tb_control: the control logic driven over SPI, with modelled frameworks.
//
// A reference memory stands in for the six frameworks' registers (8 lines
// each) and a table for their ReadBack entries. The test selects random
// addresses, writes and reads through SPI, reads all 16 table-of-content
// entries, reads ReadBack entries, and checks that addresses without a
// module return zero and that miso is only driven by read instructions.
module tb_control;
  import panic_pkg::*;
  int checks = 0, failures = 0;
  logic reset = 0, miso_oe;
  logic [5:0] mod_sel;
  logic [2:0] line, rb_idx;
  logic we;
  logic [7:0] wdata;
  logic [7:0] mod_rdata [6];
  src_t mod_rb [6];
  logic [7:0] regs [6][8];
  logic oe_seen_on_write = 0;

  spi_bfm spi ();

  control dut (
    .sck(spi.sck), .reset, .enable(spi.enable), .mosi(spi.mosi), .miso(spi.miso), .miso_oe,
    .mod_sel, .line, .we, .wdata, .rb_idx, .mod_rdata, .mod_rb
  );

  // framework models
  always @(posedge spi.sck)
    for (int m = 0; m < 6; m++) if (we && mod_sel[m]) regs[m][line] = wdata;
  always_comb
    for (int m = 0; m < 6; m++) begin
      mod_rdata[m] = regs[m][line];
      mod_rb[m]    = src_t'({m[3:0], line, rb_idx} ^ 10'h2A5);
    end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic writing = 0;
  always @(posedge spi.sck) if (writing && miso_oe) oe_seen_on_write = 1;

  initial begin
    logic [7:0] r, d;
    logic [3:0] m;
    logic [2:0] l, j;
    logic [7:0] tags [16] = '{8'h01, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05,
                              8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
                              8'h00, 8'h00, 8'h00, 8'h00};
    for (int a = 0; a < 6; a++) for (int b = 0; b < 8; b++) regs[a][b] = 8'($urandom);
    #2 reset = 1;
    #10 reset = 0;
    for (int n = 0; n < 150; n++) begin
      m = 4'($urandom_range(0, 7)); l = 3'($urandom); d = 8'($urandom);
      writing = 1;
      spi.frame({3'd1, 1'b0, m}, {5'b0, l}, r);          // set address
      spi.frame({3'd2, 5'd0}, d, r);                     // write
      writing = 0;
      if (m < 6) check(regs[m][l] === d, $sformatf("write m%0d l%0d", m, l));
      spi.frame({3'd3, 5'd0}, 8'h00, r);                 // read
      check(r === (m < 6 ? regs[m][l] : 8'h00), $sformatf("read m%0d l%0d got %h", m, l, r));
      j = 3'($urandom);
      spi.frame({3'd5, 2'b0, j}, 8'h00, r);              // readback
      check(r === (m < 6 ? 8'({m, l, j} ^ 10'h2A5) : 8'h00), $sformatf("readback m%0d l%0d j%0d got %h", m, l, j, r));
    end
    for (int a = 0; a < 16; a++) begin
      spi.frame({3'd4, 1'b0, 4'(a)}, 8'h00, r);
      check(r === tags[a], $sformatf("toc %0d got %h", a, r));
    end
    check(!oe_seen_on_write, "miso driven during set-address or write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
