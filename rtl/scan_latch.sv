// Level-sensitive storage latch of the configuration scan chain.
//
// The latch is the classic two-transmission-gate loop: an input gate that
// conducts while the local clock is low, an inverter that drives the output,
// and a feedback inverter plus gate that close the loop while the clock is
// high. The output is therefore the complement of the stored input.
//
// Interface: a (data in), clk (latch clock, transparent while low),
// y (inverted stored value).
// Timing: while clk = 0, y follows ~a combinationally; when clk rises, the
// value of a just before the edge is held until clk falls again.
//
// The transparency polarity and the inversion follow the transistor drawing
// of the latch; the clock buffer that the drawing shows in front of the two
// gates is non-inverting and has no logic effect, so it is not modelled here.
// A latch is intended: it is the storage element of the scan chain.
module scan_latch (
  input  logic a,
  input  logic clk,
  output logic y
);
  logic stored;

  always_latch begin
    if (!clk) stored = a;
  end

  assign y = ~stored;
endmodule
