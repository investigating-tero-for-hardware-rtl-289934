// ripple_counter: asynchronous (ripple) binary up-counter.
//
// Bit 0 is a toggle flip-flop clocked by the rising edges of pulse; bit i
// toggles when bit i-1 falls. The counter therefore needs no system clock and
// can count pulse trains far faster than the system clock, such as the burst
// of a ring oscillator. count is only stable once pulse has been quiet for
// WIDTH flip-flop delays. clr is an asynchronous, active-high clear. The count
// wraps at 2**WIDTH.
//
// The asynchronous counter is the one named for measuring the oscillator and
// inside the third Trojan; its width and clear input are this design's choice.
module ripple_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             pulse,
  input  logic             clr,
  output logic [WIDTH-1:0] count
);

  timeunit 1ns;
  timeprecision 1ps;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    logic stage_clk;
    logic q;
    if (i == 0) begin : g_first
      assign stage_clk = pulse;
    end else begin : g_next
      assign stage_clk = ~g_stage[i-1].q;
    end
    always_ff @(posedge stage_clk or posedge clr) begin
      if (clr) q <= 1'b0;
      else     q <= ~q;
    end
    assign count[i] = q;
  end

endmodule
