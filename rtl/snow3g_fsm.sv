// snow3g_fsm: the finite state machine of SNOW 3G: three 32-bit registers
// R1, R2, R3, the S-boxes S1 and S2 and two 32-bit adders.
//
// Combinationally, f = (s15 + R1) ^ R2 (addition mod 2^32). On an advance
//     R1 <= R2 + (R3 ^ s5),  R2 <= S1(R1),  R3 <= S2(R2)
// so a word entering R1 reaches R3 through S1 and S2 in two clocks, as in
// the chain R1 -> S1 -> R2 -> S2 -> R3 of the block diagram. clear (used
// when a new key is loaded) and the synchronous active-low rst_n set all
// three registers to zero; clear has priority over advance.
module snow3g_fsm
  import snow3g_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  advance,
  input  word_t s5,
  input  word_t s15,
  output word_t f
);

  timeunit 1ns;
  timeprecision 1ps;

  word_t r1, r2, r3;
  word_t s1_out, s2_out;

  snow3g_sbox #(.IS_S2(1'b0)) u_s1 (.w(r1), .r(s1_out));
  snow3g_sbox #(.IS_S2(1'b1)) u_s2 (.w(r2), .r(s2_out));

  always_comb f = (s15 + r1) ^ r2;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      r1 <= '0;
      r2 <= '0;
      r3 <= '0;
    end else if (advance) begin
      r1 <= r2 + (r3 ^ s5);
      r2 <= s1_out;
      r3 <= s2_out;
    end
  end

endmodule
