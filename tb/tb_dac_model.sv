// tb_dac_model: all 256 codes of the DAC model, 10 mV per step.
module tb_dac_model;
  import panic_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] code;
  mv_t vout;

  dac_model dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      code = 8'(c);
      #1;
      checks++;
      if (vout !== mv_t'(c * 10)) begin
        failures++;
        $display("FAIL code %0d vout %0d", c, vout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
