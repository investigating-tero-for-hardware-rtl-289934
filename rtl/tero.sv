// tero: behavioural model of a Transient Effect Ring Oscillator (TERO).
// This is not synthesizable logic: a TERO is a delay-dependent loop whose
// behaviour comes from analog gate delays, so it is modelled with timed
// delays for simulation. On silicon or an FPGA it is two NAND gates and
// 2*(LENGTH/2) inverters placed by hand.
//
// Structure modelled: two NAND gates share the control input ctrl; each
// NAND drives a chain of LENGTH/2 inverters, and the end of each chain feeds
// the other NAND's second input (a cross-coupled loop, an SR latch stretched
// by delay lines). out is the end of one chain and drives an asynchronous
// counter.
//
// Behaviour: with ctrl = 0 both NAND outputs are forced to 1, so both chains
// settle to the same known state and out = 1. When ctrl rises both NANDs
// switch together and the loop starts to oscillate with period
// 2*HALF_PS, HALF_PS = T_NAND_PS + (LENGTH/2)*T_INV_PS. Because the two
// branches are never perfectly matched, the low part of each period shrinks
// by MISMATCH_PS per oscillation (optionally plus a random jitter of up to
// +/-JITTER_PS) until the pulse vanishes and the loop locks with out = 1.
// The number of oscillations in the burst, ceil(HALF_PS / MISMATCH_PS)
// without jitter, is what the counter measures; it depends on the delays of
// the gates and wires and hence on what surrounds the TERO. If ctrl falls
// during a burst, out returns to 1 at the end of the current half-period.
//
// The NAND/inverter loop and the single ctrl signal follow the oscillator's
// published structure; the delay values, the linear shrink of the pulse and
// reading LENGTH as the total number of inverters are this model's choices.
module tero #(
  parameter int unsigned LENGTH      = 4,   // total inverters in the loop, even
  parameter int unsigned T_NAND_PS   = 40,  // NAND delay, ps
  parameter int unsigned T_INV_PS    = 30,  // inverter delay, ps
  parameter int unsigned MISMATCH_PS = 2,   // pulse shrink per oscillation, ps
  parameter int unsigned JITTER_PS   = 0    // random jitter per oscillation, ps
) (
  input  logic ctrl,
  output logic out
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int HALF_PS = int'(T_NAND_PS + (LENGTH / 2) * T_INV_PS);

  initial begin
    if (LENGTH < 2 || LENGTH % 2 != 0)
      $error("tero: LENGTH must be even and at least 2");
    if (MISMATCH_PS == 0)
      $error("tero: MISMATCH_PS must be above 0 for the burst to end");
  end

  initial out = 1'b1;

  always @(posedge ctrl) begin : burst
    int low_w;
    low_w = HALF_PS;
    while (ctrl && low_w > 0) begin
      out = 1'b0;
      repeat (low_w) #1;               // low phase, in 1 ps steps
      out = 1'b1;
      repeat (2 * HALF_PS - low_w) #1; // high phase
      low_w -= int'(MISMATCH_PS);
      if (JITTER_PS != 0)
        low_w += int'($urandom_range(2 * JITTER_PS)) - int'(JITTER_PS);
    end
    out = 1'b1;
  end

endmodule
