// iir_mac: the arithmetic of one pipeline stage of the CT IIR filter (five products summed).
//
// Each adder of the filter adds up to five products of a 16-bit data word and a 10-bit
// coefficient. Coefficients are signed with 8 fractional bits (range -2 to just under 2),
// so the sum of products is shifted right by 8 (rounding toward minus infinity) and
// saturated to the 16-bit range. Unused terms get a zero coefficient.
// The block is purely combinational; in the filter it must settle within one cell delay
// tg, the time between two pipeline strobes. Its structure is this design's own; the
// document only says the multipliers and adders were synthesized from an HDL description.
module iir_mac
  import ctdsp_pkg::*;
#(
  parameter int N = 5
) (
  input  data_t       d [N],
  input  coef_t       c [N],
  output data_t       y
);

  logic signed [31:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < N; i++)
      acc += 32'(d[i]) * 32'(c[i]);
    y = sat16(acc >>> CFRAC);
  end

endmodule
