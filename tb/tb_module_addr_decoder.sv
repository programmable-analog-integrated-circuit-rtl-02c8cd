// tb_module_addr_decoder: all 16 module addresses, prototype size.
//
// Addresses 0-5 must select exactly their module and be valid; 6-15 must
// select nothing and be invalid.
module tb_module_addr_decoder;
  int checks = 0, failures = 0;
  logic [3:0] addr;
  logic [5:0] sel;
  logic       valid;

  module_addr_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      checks++;
      if (a < 6) begin
        if (sel !== 6'(1 << a) || !valid) begin
          failures++;
          $display("FAIL addr %0d sel %b valid %b", a, sel, valid);
        end
      end else if (sel !== '0 || valid) begin
        failures++;
        $display("FAIL addr %0d sel %b valid %b", a, sel, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
