// snow3g_sbox: the 32-bit S-box S1 (IS_S2=0) or S2 (IS_S2=1) of the SNOW 3G
// finite state machine.
//
// As in the cipher's block diagram, the box is four T-tables (T0..T3): each
// takes one byte of the input word and returns a 32-bit word, and the four
// results are XORed. A T-table entry is the byte S-box output (SR for S1, SQ
// for S2) spread over the four output bytes by the MixColumn coefficients
// 1, 2, 3 (2 is MULx with 0x1B for S1 and 0x69 for S2). The tables are
// computed at elaboration by snow3g_pkg from the S-boxes' formulas.
//
// Purely combinational: r follows w with no clock.
module snow3g_sbox
  import snow3g_pkg::*;
#(
  parameter bit IS_S2 = 1'b0
) (
  input  word_t w,
  output word_t r
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam byte_t       C  = IS_S2 ? POLY_S2 : POLY_S1;
  localparam byte_table_t SB = gen_sbox(IS_S2);
  localparam word_table_t T0 = gen_ttable(SB, C, 0);
  localparam word_table_t T1 = gen_ttable(SB, C, 1);
  localparam word_table_t T2 = gen_ttable(SB, C, 2);
  localparam word_table_t T3 = gen_ttable(SB, C, 3);

  always_comb r = T0[w[31:24]] ^ T1[w[23:16]] ^ T2[w[15:8]] ^ T3[w[7:0]];

endmodule
