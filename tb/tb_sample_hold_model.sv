// tb_sample_hold_model: track and hold of the sample & hold model.
//
// While tracking the output follows a changing input; after track falls it
// keeps the value the input had then, however the input moves.
module tb_sample_hold_model;
  import panic_pkg::*;
  int checks = 0, failures = 0;
  logic track;
  mv_t vin, vout, held;

  sample_hold_model dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      track = 1;
      for (int k = 0; k < 5; k++) begin
        vin = mv_t'($urandom_range(0, 3300));
        #1;
        checks++;
        if (vout !== vin) begin failures++; $display("FAIL track"); end
      end
      held = vin;
      track = 0;
      #1;
      for (int k = 0; k < 5; k++) begin
        vin = mv_t'($urandom_range(0, 3300));
        #1;
        checks++;
        if (vout !== held) begin failures++; $display("FAIL hold %0d vs %0d", vout, held); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
