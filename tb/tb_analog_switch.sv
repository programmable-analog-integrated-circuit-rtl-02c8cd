// tb_analog_switch: node voltage for random switch patterns.
//
// The node must read 0 and undriven with no switch closed, the source with
// one closed, and the integer mean of the closed sources otherwise.
module tb_analog_switch;
  import panic_pkg::*;
  int checks = 0, failures = 0;
  mv_t src [8];
  logic [7:0] close;
  mv_t node;
  logic driven;

  analog_switch #(.N(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, c;
    for (int n = 0; n < 500; n++) begin
      foreach (src[k]) src[k] = mv_t'($urandom_range(0, 3300));
      close = (n < 8) ? 8'(1 << n) : (n == 8 ? 8'h00 : 8'($urandom));
      #1;
      s = 0; c = 0;
      foreach (src[k]) if (close[k]) begin s += src[k]; c++; end
      checks++;
      if (driven !== (c != 0) || node !== (c == 0 ? mv_t'(0) : mv_t'(s / c))) begin
        failures++;
        $display("FAIL close %b node %0d", close, node);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
