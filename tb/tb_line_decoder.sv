// tb_line_decoder: every select and line address, with 5 and with 3 IRS.
//
// Exactly the addressed register's enable must be high when selected, none
// when not selected, and lines of absent IRS cells must enable nothing.
module tb_line_decoder;
  int checks = 0, failures = 0;
  logic       sel;
  logic [2:0] line;
  logic [4:0] irs_en;
  logic [2:0] irs_en3;
  logic [1:0] ors_en, ors_en3;
  logic       mreg_en, mreg_en3;

  line_decoder dut (.sel, .line, .irs_en, .ors_en, .mreg_en);
  line_decoder #(.N_IRS(3)) dut3 (.sel, .line, .irs_en(irs_en3), .ors_en(ors_en3), .mreg_en(mreg_en3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp, got, got3, exp3;
    for (int v = 0; v < 16; v++) begin
      {sel, line} = 4'(v);
      #1;
      exp  = sel ? 8'(1 << line) : 8'h00;
      exp3 = (line == 3 || line == 4) ? 8'h00 : exp;
      got  = {mreg_en, ors_en, irs_en};
      got3 = {mreg_en3, ors_en3, 2'b00, irs_en3};
      checks += 2;
      if (got !== exp) begin
        failures++;
        $display("FAIL sel %b line %0d got %b", sel, line, got);
      end
      if (got3 !== exp3) begin
        failures++;
        $display("FAIL (3 IRS) sel %b line %0d got %b", sel, line, got3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
