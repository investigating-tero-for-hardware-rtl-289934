// snow3g_core: the SNOW 3G stream cipher, one 32-bit keystream word per clock.
//
// The core joins the LFSR and the FSM and adds a small controller and the
// 32-bit output register Zt. A one-clock start pulse loads key and IV into
// the LFSR and clears R1..R3. The controller then runs INIT_CLOCKS (32)
// initialisation clocks, in which the FSM output F is fed back into the
// LFSR, and one keystream-mode clock whose output is discarded. From then on
// every clock registers z = F ^ S0 into Zt and sets z_valid, until the next
// start or reset.
//
// Timing: if start is high at clock edge 0, z and z_valid change at edge 34
// for the first word (1 load + 32 init + 1 discarded clock) and a new word
// follows at every edge. busy is high from the load until the first word.
// rst_n is synchronous and active low; it clears every register, including
// Zt, so a reset stops the keystream until the next start.
//
// The datapath follows the cipher's block diagram; the start/busy/z_valid
// handshake is this design's own.
module snow3g_core
  import snow3g_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] iv,
  output word_t        z,
  output logic         z_valid,
  output logic         busy
);

  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,
    ST_INIT    = 2'd1,
    ST_DISCARD = 2'd2,
    ST_KEYSTR  = 2'd3
  } state_t;

  state_t      state;
  logic [5:0]  init_cnt;
  word_t       s0, s5, s15, f;
  logic        advance, init_mode;

  assign advance   = (state != ST_IDLE) && !start;
  assign init_mode = (state == ST_INIT);

  snow3g_lfsr u_lfsr (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (start),
    .key      (key),
    .iv       (iv),
    .advance  (advance),
    .init_mode(init_mode),
    .f_in     (f),
    .s0       (s0),
    .s5       (s5),
    .s15      (s15)
  );

  snow3g_fsm u_fsm (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (start),
    .advance(advance),
    .s5     (s5),
    .s15    (s15),
    .f      (f)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      init_cnt <= '0;
      z        <= '0;
      z_valid  <= 1'b0;
    end else if (start) begin
      state    <= ST_INIT;
      init_cnt <= '0;
      z        <= '0;
      z_valid  <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: ;
        ST_INIT: begin
          init_cnt <= init_cnt + 6'd1;
          if (init_cnt == 6'(INIT_CLOCKS - 1)) state <= ST_DISCARD;
        end
        ST_DISCARD: state <= ST_KEYSTR;
        ST_KEYSTR: begin
          z       <= f ^ s0;
          z_valid <= 1'b1;
        end
      endcase
    end
  end

  assign busy = (state != ST_IDLE) && !z_valid;

endmodule
