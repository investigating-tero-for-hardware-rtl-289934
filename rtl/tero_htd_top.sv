// tero_htd_top: the four designs of the Trojan-detection experiment side by
// side, so that a clean cipher and three infected ones can be run on the
// same stimulus and compared.
//
// Index 0 is SNOW 3G + TERO without a Trojan; indices 1, 2, 3 add Trojan1,
// Trojan2 and Trojan3. All four share the clock, the system reset, the
// start/key/IV inputs and the TERO control and clear lines. Each brings out
// its keystream z[i] with z_valid[i], the reset its cipher actually sees
// (cipher_rst_n[i]; low while a Trojan holds it), the Trojan trigger and its
// TERO count. With the same key and IV the four keystreams are equal until a
// Trojan fires; from then on that design's cipher is held in, or knocked
// into, reset and its keystream stops.
module tero_htd_top #(
  parameter int unsigned TERO_LENGTH = 4,
  parameter int unsigned COUNT_WIDTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [127:0]           key,
  input  logic [127:0]           iv,
  input  logic                   tero_ctrl,
  input  logic                   tero_clr,
  output logic [31:0]            z              [4],
  output logic [3:0]             z_valid,
  output logic [3:0]             busy,
  output logic [3:0]             cipher_rst_n,
  output logic [3:0]             trojan_trigger,
  output logic [COUNT_WIDTH-1:0] tero_count     [4]
);

  timeunit 1ns;
  timeprecision 1ps;

  for (genvar i = 0; i < 4; i++) begin : g_design
    snow3g_tero_system #(
      .TROJAN     (i),
      .TERO_LENGTH(TERO_LENGTH),
      .COUNT_WIDTH(COUNT_WIDTH)
    ) u_design (
      .clk           (clk),
      .rst_n         (rst_n),
      .start         (start),
      .key           (key),
      .iv            (iv),
      .z             (z[i]),
      .z_valid       (z_valid[i]),
      .busy          (busy[i]),
      .cipher_rst_n  (cipher_rst_n[i]),
      .trojan_trigger(trojan_trigger[i]),
      .tero_ctrl     (tero_ctrl),
      .tero_clr      (tero_clr),
      .tero_count    (tero_count[i])
    );
  end

endmodule
