// module_addr_decoder: selects one analog module from its 4-bit address.
//
// Combinational one-hot decoder. The architecture addresses up to 16
// modules; N_MODULES of them are built (6 in the prototype). An address
// with no module behind it selects nothing and drops valid, so writes to it
// are lost and reads of it return zero.
module module_addr_decoder #(
  parameter int unsigned N_MODULES = 6
) (
  input  logic [3:0]           addr,
  output logic [N_MODULES-1:0] sel,
  output logic                 valid
);

  always_comb begin
    sel = '0;
    for (int unsigned m = 0; m < N_MODULES; m++)
      sel[m] = (addr == 4'(m));
    valid = (32'(addr) < N_MODULES);
  end

endmodule
