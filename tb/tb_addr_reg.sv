// tb_addr_reg: checks the address register against a reference copy.
//
// Random load strobes and values over many clock cycles; the register must
// change only on a load, and reset must return it to module 0, line 0.
module tb_addr_reg;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 0, load = 0;
  logic [3:0] module_in, module_addr, ref_m;
  logic [2:0] line_in, line_addr, ref_l;

  addr_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    module_in = '0; line_in = '0;
    #1 reset = 1;
    #9 reset = 0;
    ref_m = '0; ref_l = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      checks++;
      if (module_addr !== ref_m || line_addr !== ref_l) begin
        failures++;
        $display("FAIL cycle %0d: %h/%h expected %h/%h", n, module_addr, line_addr, ref_m, ref_l);
      end
      load = 1'($urandom);
      module_in = 4'($urandom);
      line_in = 3'($urandom);
      if (load) begin ref_m = module_in; ref_l = line_in; end
    end
    @(negedge clk);
    reset = 1; #1;
    checks++;
    if (module_addr !== 0 || line_addr !== 0) failures++;
    reset = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
