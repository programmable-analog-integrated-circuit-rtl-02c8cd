// tb_toc_rom: reads all 16 entries of the prototype's table of content.
//
// Expected: two DACs, sample & hold, comparator, OTA, bandgap at addresses
// 0-5 (tags 1,1,2,3,4,5) and no module (tag 0) above.
module tb_toc_rom;
  int checks = 0, failures = 0;
  logic [3:0] addr;
  logic [7:0] tag;
  logic [7:0] expected [16] = '{8'h01, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05,
                                 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
                                 8'h00, 8'h00, 8'h00, 8'h00};

  toc_rom dut (.*);

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
      if (tag !== expected[a]) begin
        failures++;
        $display("FAIL addr %0d tag %h expected %h", a, tag, expected[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
