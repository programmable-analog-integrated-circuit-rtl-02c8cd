// tb_comparator_model: decision of the comparator model on random inputs.
module tb_comparator_model;
  import panic_pkg::*;
  int checks = 0, failures = 0;
  mv_t vp, vn;
  logic out;

  comparator_model dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      vp = mv_t'($urandom_range(0, 3300));
      vn = (n % 10 == 0) ? vp : mv_t'($urandom_range(0, 3300));
      #1;
      checks++;
      if (out !== (int'(vp) > int'(vn))) begin
        failures++;
        $display("FAIL %0d > %0d gave %b", vp, vn, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
