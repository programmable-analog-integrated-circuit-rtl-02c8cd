// tb_ota_model: linear region and clipping of the OTA model.
//
// Gain 1000 around 1650 mV on a 3300 mV supply: inputs 1 mV apart move the
// outputs by 1000 mV in opposite directions; 2 mV or more clips them.
module tb_ota_model;
  import panic_pkg::*;
  int checks = 0, failures = 0;
  mv_t vp, vn, outp, outn;

  ota_model dut (.*);

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 3300 ? 3300 : v);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    for (int n = 0; n < 400; n++) begin
      vn = mv_t'($urandom_range(100, 3000));
      d = $urandom_range(0, 6) - 3;
      vp = mv_t'(int'(vn) + d);
      #1;
      checks += 2;
      if (outp !== mv_t'(clip(1650 + 1000 * d))) begin failures++; $display("FAIL outp d=%0d %0d", d, outp); end
      if (outn !== mv_t'(clip(1650 - 1000 * d))) begin failures++; $display("FAIL outn d=%0d %0d", d, outn); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
