// One scan-chain module: a master-slave shift stage on two clock phases.
//
// The serial input is inverted, captured by a latch clocked by CLK1, passed to
// a second latch clocked by CLK2 and inverted again onto the serial output.
// Each latch inverts, so the four inversions leave the stored bit with the
// same polarity as the serial input. The two clocks are buffered by two
// inverters each and passed on to the next stage. The stored bit, taken at
// the serial output, is also the select line that this stage drives into its
// mux; which node feeds the mux is this design's choice.
//
// Interface: sel_in / sel_out serial data, clk1_in / clk2_in the two clock
// phases, clk1_out / clk2_out the same phases passed on, sel the stored bit.
// Timing: the latches are transparent while their clock is low. One shift
// step is a low pulse on clk1 followed, after clk1 has risen, by a low pulse
// on clk2. The two phases must never be low together (asserted below); both
// are high when the chain is idle and holds its configuration.
// A latch is intended here: the scan cell is built of two latches.
module scan_cell (
  input  logic sel_in,
  input  logic clk1_in,
  input  logic clk2_in,
  output logic sel_out,
  output logic clk1_out,
  output logic clk2_out,
  output logic sel
);
  logic sel_in_b;   // after the input inverter
  logic master_q;   // output of the CLK1 latch (inverted again)
  logic slave_q;    // output of the CLK2 latch

  assign sel_in_b = ~sel_in;

  scan_latch u_master (.a(sel_in_b), .clk(clk1_in), .y(master_q));
  scan_latch u_slave  (.a(master_q), .clk(clk2_in), .y(slave_q));

  assign sel_out  = ~slave_q;
  assign sel      = sel_out;
  assign clk1_out = clk1_in;
  assign clk2_out = clk2_in;

  // Two-phase rule: both latches transparent at once would let data race
  // through the stage.
  always_comb begin
    assert (clk1_in || clk2_in)
      else $error("scan_cell: clk1 and clk2 low at the same time");
  end
endmodule
