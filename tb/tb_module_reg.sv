// tb_module_reg: digital output register and digital input read path.
module tb_module_reg;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, en, we;
  logic [7:0] wdata, dout, din, rdata, ref_d;

  module_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; wdata = 0; din = 0;
    #1 reset = 1;
    #9 reset = 0;
    ref_d = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      din = 8'($urandom);
      #1;
      checks += 2;
      if (dout !== ref_d) begin
        failures++;
        $display("FAIL cycle %0d dout %h expected %h", n, dout, ref_d);
      end
      if (rdata !== din) begin
        failures++;
        $display("FAIL cycle %0d rdata %h din %h", n, rdata, din);
      end
      en = 1'($urandom); we = 1'($urandom); wdata = 8'($urandom);
      if (en && we) ref_d = wdata;
    end
    reset = 1; #1;
    checks++;
    if (dout !== 0) failures++;
    reset = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
