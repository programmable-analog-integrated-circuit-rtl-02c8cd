// tb_amf: register map, line decoding and ReadBack of one framework.
//
// Random writes to random lines with random select; a reference model of
// all eight registers is compared with the switch outputs and with rdata
// for every line, and ReadBack entries with the wiring table. The module
// register reads the cell's digital inputs.
module tb_amf;
  import panic_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, sel, we;
  logic [2:0] line, rb_idx;
  logic [7:0] wdata, rdata, mreg_dout, mreg_din;
  src_t rb_data;
  logic [7:0] irs_sw [5];
  logic [3:0] ors_pin_sw [2];
  logic [7:0] model [8];

  localparam amf_src_t T = PROTO_WIRING[3];

  amf #(.N_IRS(5), .SRC(T)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    sel = 0; we = 0; line = 0; rb_idx = 0; wdata = 0; mreg_din = 8'hA5;
    #1 reset = 1;
    #9 reset = 0;
    foreach (model[k]) model[k] = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++) check(irs_sw[i] === model[i], $sformatf("irs %0d", i));
      for (int o = 0; o < 2; o++)
        check(ors_pin_sw[o] === (model[5+o][2] ? 4'(1 << model[5+o][1:0]) : 4'b0), $sformatf("ors %0d", o));
      check(mreg_dout === model[7], "mreg dout");
      // read every line
      for (int l = 0; l < 8; l++) begin
        line = 3'(l); mreg_din = 8'($urandom);
        #0.1;
        exp = (l == 7) ? mreg_din : (l >= 5 ? {5'b0, model[l][2:0]} : model[l]);
        check(rdata === exp, $sformatf("read line %0d = %h expected %h", l, rdata, exp));
        if (l < 5) begin
          rb_idx = 3'($urandom);
          #0.1;
          check(rb_data === T[l][rb_idx], $sformatf("readback %0d.%0d", l, rb_idx));
        end
      end
      sel = 1'($urandom); we = 1'($urandom); line = 3'($urandom); wdata = 8'($urandom);
      if (sel && we) model[line] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
