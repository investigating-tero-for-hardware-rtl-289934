// snow3g_tero_system: one of the four evaluated designs: a SNOW 3G core, an
// optional hardware Trojan in its reset path, and a TERO sensor with its
// asynchronous counter.
//
// TROJAN selects the variant: 0 is Trojan-free (the reset goes straight to
// the cipher), 1, 2 and 3 insert trojan1, trojan2 or trojan3 between the
// system reset rst_n and the cipher reset cipher_rst_n; each Trojan watches
// the cipher's keystream z. The TERO is logically independent of the
// cipher: it is a sensor placed between cipher and Trojan, and its burst
// length, read from tero_count, is what tells an infected device from a
// clean one through the changed delays around it. (That physical coupling
// is not modelled, so in simulation all four variants give the same count.)
//
// Measurement: hold tero_ctrl low (loop reset) and pulse tero_clr, then
// raise tero_ctrl; once the burst has died out, tero_count holds the number
// of oscillations. Cipher timing is that of snow3g_core.
module snow3g_tero_system #(
  parameter int unsigned TROJAN      = 0,   // 0 none, 1..3 Trojan1..Trojan3
  parameter int unsigned TERO_LENGTH = 4,   // inverters in the TERO loop
  parameter int unsigned COUNT_WIDTH = 16   // TERO counter width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [127:0]           key,
  input  logic [127:0]           iv,
  output logic [31:0]            z,
  output logic                   z_valid,
  output logic                   busy,
  output logic                   cipher_rst_n,
  output logic                   trojan_trigger,
  input  logic                   tero_ctrl,
  input  logic                   tero_clr,
  output logic [COUNT_WIDTH-1:0] tero_count
);

  timeunit 1ns;
  timeprecision 1ps;

  logic tero_out;

  snow3g_core u_cipher (
    .clk    (clk),
    .rst_n  (cipher_rst_n),
    .start  (start),
    .key    (key),
    .iv     (iv),
    .z      (z),
    .z_valid(z_valid),
    .busy   (busy)
  );

  if (TROJAN == 1) begin : g_trojan1
    trojan1 u_trojan (
      .z        (z),
      .rst_n_in (rst_n),
      .rst_n_out(cipher_rst_n),
      .trigger  (trojan_trigger)
    );
  end else if (TROJAN == 2) begin : g_trojan2
    trojan2 u_trojan (
      .clk      (clk),
      .z        (z),
      .rst_n_in (rst_n),
      .rst_n_out(cipher_rst_n),
      .trigger  (trojan_trigger)
    );
  end else if (TROJAN == 3) begin : g_trojan3
    trojan3 u_trojan (
      .z        (z),
      .rst_n_in (rst_n),
      .rst_n_out(cipher_rst_n),
      .trigger  (trojan_trigger)
    );
  end else begin : g_clean
    assign cipher_rst_n   = rst_n;
    assign trojan_trigger = 1'b0;
  end

  tero #(.LENGTH(TERO_LENGTH)) u_tero (
    .ctrl(tero_ctrl),
    .out (tero_out)
  );

  ripple_counter #(.WIDTH(COUNT_WIDTH)) u_counter (
    .pulse(tero_out),
    .clr  (tero_clr),
    .count(tero_count)
  );

endmodule
