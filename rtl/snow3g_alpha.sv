// snow3g_alpha: the two GF(2^32) constant multipliers in the SNOW 3G LFSR
// feedback, drawn as the boxes "alpha" and "alpha^-1".
//
// mul_out = MULalpha(mul_in) is applied to the top byte of stage S0, and
// div_out = DIValpha(div_in) to the bottom byte of stage S11. Both maps are
// linear over GF(2), so each output is the XOR of the basis words selected by
// the set bits of its input byte; the eight basis words of each map are
// computed at elaboration from the MULxPOW definition in snow3g_pkg. This
// replaces the 256x32 lookup tables of a software implementation with two
// 8-input XOR networks.
//
// Purely combinational.
module snow3g_alpha
  import snow3g_pkg::*;
(
  input  byte_t mul_in,
  input  byte_t div_in,
  output word_t mul_out,
  output word_t div_out
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam basis_t MUL_BASIS = gen_alpha_basis(1'b0);
  localparam basis_t DIV_BASIS = gen_alpha_basis(1'b1);

  always_comb begin
    mul_out = '0;
    div_out = '0;
    for (int k = 0; k < 8; k++) begin
      if (mul_in[k]) mul_out ^= MUL_BASIS[k];
      if (div_in[k]) div_out ^= DIV_BASIS[k];
    end
  end

endmodule
