// snow3g_lfsr: the 16-stage, 32-bit linear feedback shift register of SNOW 3G
// (stages S0..S15).
//
// On every advance the register shifts one stage towards S0 and the new S15
// is
//     v = (S0 << 8) ^ MULalpha(S0[31:24]) ^ S2 ^ (S11 >> 8)
//         ^ DIValpha(S11[7:0]) ^ (init_mode ? f_in : 0)
// which is the multiplication of S0 by alpha and of S11 by alpha^-1 in
// GF(2^32), plus the multiplexer that feeds the FSM output F back during
// initialisation and the constant 0 in keystream mode.
//
// load copies key and IV into the stages in the SNOW 3G pattern (key words
// k0..k3 with k0 in key[127:96]; IV0 in iv[127:96]); load has priority
// over advance. rst_n is synchronous and active low and clears all stages.
// The stages S0, S5 and S15 that the FSM and the output use are outputs.
module snow3g_lfsr
  import snow3g_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] key,
  input  logic [127:0] iv,
  input  logic         advance,
  input  logic         init_mode,
  input  word_t        f_in,
  output word_t        s0,
  output word_t        s5,
  output word_t        s15
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam word_t ONES = '1;

  word_t s [LFSR_STAGES];
  word_t k0, k1, k2, k3, iv0, iv1, iv2, iv3;
  word_t mul_a, div_a, feedback;

  assign {k0, k1, k2, k3}     = key;
  assign {iv0, iv1, iv2, iv3} = iv;

  snow3g_alpha u_alpha (
    .mul_in (s[0][31:24]),
    .div_in (s[11][7:0]),
    .mul_out(mul_a),
    .div_out(div_a)
  );

  always_comb
    feedback = (s[0] << 8) ^ mul_a ^ s[2] ^ (s[11] >> 8) ^ div_a
             ^ (init_mode ? f_in : '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LFSR_STAGES; i++) s[i] <= '0;
    end else if (load) begin
      s[15] <= k3 ^ iv0;         s[14] <= k2;
      s[13] <= k1;               s[12] <= k0 ^ iv1;
      s[11] <= k3 ^ ONES;        s[10] <= k2 ^ ONES ^ iv2;
      s[9]  <= k1 ^ ONES ^ iv3;  s[8]  <= k0 ^ ONES;
      s[7]  <= k3;               s[6]  <= k2;
      s[5]  <= k1;               s[4]  <= k0;
      s[3]  <= k3 ^ ONES;        s[2]  <= k2 ^ ONES;
      s[1]  <= k1 ^ ONES;        s[0]  <= k0 ^ ONES;
    end else if (advance) begin
      for (int i = 0; i < LFSR_STAGES - 1; i++) s[i] <= s[i+1];
      s[15] <= feedback;
    end
  end

  assign s0  = s[0];
  assign s5  = s[5];
  assign s15 = s[15];

endmodule
