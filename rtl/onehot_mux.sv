// N:1 multiplexer with one select line per input.
//
// In the circuit each input drives a shared output node through a tri-state
// inverter enabled by its own select line, and an inverter restores the
// polarity. Logically that is an AND-OR: the output carries the input whose
// select line is high. With no select high the output is 0 (in silicon the
// node would float); with several high the result is the OR of those inputs
// (in silicon the drivers would fight), so the configuration must keep each
// select group one-hot. That rule is left to the configuration, not checked
// here, because the scan chain passes through non-one-hot patterns while it
// shifts.
//
// Interface: din[N] words of WIDTH bits, sel[N] one-hot, dout.
// Timing: purely combinational.
module onehot_mux #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIDTH = hyperx_pkg::WIDTH
) (
  input  logic [N-1:0][WIDTH-1:0] din,
  input  logic [N-1:0]            sel,
  output logic [WIDTH-1:0]        dout
);
  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++) begin
      dout |= din[i] & {WIDTH{sel[i]}};
    end
  end
endmodule
