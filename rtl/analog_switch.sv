// analog_switch: behavioural model of an analog switch network node.
//
// Behavioural model, not a circuit: it stands for the CMOS switches of an
// IRS, or for all ORS switches that reach one off-chip output pin. N sources
// can each be connected to one node by a switch. Voltages are unsigned
// millivolts. With no switch closed the node floats and reads 0 with driven
// low; with one closed it carries that source; with several closed it
// carries their mean, as equal switch resistances shorting ideal sources
// would give. The switch itself (on-resistance, charge injection) is not
// modelled. Combinational.
module analog_switch
  import panic_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  mv_t          src   [N],
  input  logic [N-1:0] close,
  output mv_t          node,
  output logic         driven
);

  logic [31:0] sum;
  logic [31:0] cnt;

  always_comb begin
    sum = '0;
    cnt = '0;
    for (int unsigned k = 0; k < N; k++)
      if (close[k]) begin
        sum = sum + 32'(src[k]);
        cnt = cnt + 32'd1;
      end
    driven = (cnt != 0);
    node   = driven ? mv_t'(sum / cnt) : '0;
  end

endmodule
