// tb_irs: register, write gating, reset and ReadBack of one IRS.
//
// Writes random switch patterns with random en/we and compares with a
// reference; reads all eight ReadBack entries of a test wiring table.
module tb_irs;
  import panic_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, en, we;
  logic [7:0] wdata, sw, ref_sw;
  logic [2:0] rb_idx;
  src_t rb_data;

  localparam irs_src_t T = {8'h43, 8'h8D, 8'h00, 8'h96, 8'h41, 8'h80, 8'h42, 8'h40};

  irs #(.SRC(T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; wdata = 0; rb_idx = 0;
    #1 reset = 1;
    #9 reset = 0;
    ref_sw = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      checks++;
      if (sw !== ref_sw) begin
        failures++;
        $display("FAIL cycle %0d sw %h expected %h", n, sw, ref_sw);
      end
      en = 1'($urandom); we = 1'($urandom); wdata = 8'($urandom);
      if (en && we) ref_sw = wdata;
    end
    for (int j = 0; j < 8; j++) begin
      rb_idx = 3'(j);
      #1;
      checks++;
      if (rb_data !== T[j]) begin
        failures++;
        $display("FAIL readback %0d = %h expected %h", j, rb_data, T[j]);
      end
    end
    reset = 1; #1;
    checks++;
    if (sw !== 0) failures++;
    reset = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
