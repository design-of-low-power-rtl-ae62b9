// Serial chain of scan-chain modules holding the mux selects of one
// sub-switch half.
//
// NBITS scan_cell stages are connected in series: the serial output and the
// two buffered clock phases of each stage feed the next one. Stage 0 is next
// to sel_in, so after NBITS shift steps the first bit shifted in sits in
// stage NBITS-1. The stored bits are brought out in parallel as sel[i] (the
// bit of stage i) to drive the mux select lines.
//
// Interface: sel_in, clk1_in, clk2_in from the previous chain; sel_out,
// clk1_out, clk2_out to the next one; sel[NBITS-1:0] the configuration.
// Timing: one bit moves one stage per clk1-then-clk2 low pulse pair (see
// scan_cell). The number of stages follows from the muxes the chain serves.
module scan_chain #(
  parameter int unsigned NBITS = hyperx_pkg::HALF_SEL_BITS
) (
  input  logic             sel_in,
  input  logic             clk1_in,
  input  logic             clk2_in,
  output logic             sel_out,
  output logic             clk1_out,
  output logic             clk2_out,
  output logic [NBITS-1:0] sel
);
  logic [NBITS:0] d, c1, c2;

  assign d[0]  = sel_in;
  assign c1[0] = clk1_in;
  assign c2[0] = clk2_in;

  for (genvar i = 0; i < NBITS; i++) begin : g_cell
    scan_cell u_cell (
      .sel_in  (d[i]),
      .clk1_in (c1[i]),
      .clk2_in (c2[i]),
      .sel_out (d[i+1]),
      .clk1_out(c1[i+1]),
      .clk2_out(c2[i+1]),
      .sel     (sel[i])
    );
  end

  assign sel_out  = d[NBITS];
  assign clk1_out = c1[NBITS];
  assign clk2_out = c2[NBITS];
endmodule
