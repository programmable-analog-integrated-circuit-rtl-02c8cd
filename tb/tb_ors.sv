// tb_ors: register, pin switch decoding and reset of one ORS.
//
// For random writes, pin_sw must be one-hot on the written pin when the
// connect bit is set and all zero otherwise; rdata must return the three
// register bits.
module tb_ors;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, en, we;
  logic [7:0] wdata, rdata, ref_r;
  logic [3:0] pin_sw, exp_sw;

  ors dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; wdata = 0;
    #1 reset = 1;
    #9 reset = 0;
    ref_r = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      exp_sw = ref_r[2] ? 4'(1 << ref_r[1:0]) : 4'b0000;
      checks += 2;
      if (pin_sw !== exp_sw) begin
        failures++;
        $display("FAIL cycle %0d pin_sw %b expected %b", n, pin_sw, exp_sw);
      end
      if (rdata !== ref_r) begin
        failures++;
        $display("FAIL cycle %0d rdata %h expected %h", n, rdata, ref_r);
      end
      en = 1'($urandom); we = 1'($urandom); wdata = 8'($urandom);
      if (en && we) ref_r = {5'b0, wdata[2:0]};
    end
    reset = 1; #1;
    checks++;
    if (pin_sw !== 0 || rdata !== 0) failures++;
    reset = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
