// tb_ctrl_decoder: exhaustive check of the control signal decoder.
//
// Applies every instruction byte with every combination of instr_valid,
// last_bit and enable, and compares each output with a table written out
// from the instruction set.
module tb_ctrl_decoder;
  int checks = 0, failures = 0;
  logic [7:0] instr;
  logic instr_valid, last_bit, enable;
  logic load_addr, write_reg, sel_reg, sel_toc, sel_rb, miso_oe;

  ctrl_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] exp, got;
    logic [2:0] op;
    for (int v = 0; v < 2048; v++) begin
      {enable, last_bit, instr_valid, instr} = 11'(v);
      #1;
      op = instr[7:5];
      exp[5] = instr_valid && last_bit && op == 3'd1;
      exp[4] = instr_valid && last_bit && op == 3'd2;
      exp[3] = instr_valid && op == 3'd3;
      exp[2] = instr_valid && op == 3'd4;
      exp[1] = instr_valid && op == 3'd5;
      exp[0] = enable && instr_valid && (op == 3'd3 || op == 3'd4 || op == 3'd5);
      got = {load_addr, write_reg, sel_reg, sel_toc, sel_rb, miso_oe};
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL v=%h got %b exp %b", v, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
