// Hyper-X crossbar switch: 256 inputs to 256 outputs, 16 bits each, built
// from an 8 x 8 matrix of 4-radix sub-switches.
//
// Every sub-switch is split into an upper and a lower half, and the halves of
// one matrix row are grouped into an upper and a lower row block. A word
// travels four hops, row - diagonal - row - diagonal:
//   1. row hop (upper row block r): from external input (r, c, j) onto track k
//      and across the row to the upper half at column c';
//   2. diagonal hop: upper half (r, c') diagonal output k goes to the lower
//      half at the transposed position (c', r), diagonal input k;
//   3. row hop (lower row block c'): onto track m and across the row to the
//      lower half at column r', whose 8:1 mux m picks it;
//   4. diagonal hop: output m of lower half (c', r') is external output m of
//      sub-switch (r', c'), again the transposed position. This last hop is
//      wiring only.
// The first row hop picks the destination column c', the second the
// destination row r', so any input can reach any output. Routing is
// restricted: a word can only take the diagonal link from row r to row c'
// that upper half (r, c') owns, and its last row hop keeps its track number
// as the output port number. All words from one source row to one
// destination column therefore need distinct tracks and distinct output
// port numbers.
//
// Configuration: all mux select lines are held in one scan chain of
// TOTAL_SEL_BITS stages (6144 by default), shifted by two non-overlapping,
// active-low clock phases clk1 and clk2 (see scan_cell). The chain runs
// through the upper row blocks 0 .. DIM-1, then the lower row blocks
// 0 .. DIM-1; within a block through columns 0 .. DIM-1; within a half as
// described in upper_sub_switch. That order is this design's choice.
//
// The sub-switch organisation, the transposed diagonal links and the hop
// order follow the original design; the select encoding, the scan order and
// the logic-level modelling of the circuits are this design's own.
//
// Interface: ex_in[r][c][j] is external input j of sub-switch (r, c),
// ex_out[r][c][m] external output m of sub-switch (r, c); sel_in / sel_out,
// clk1 / clk2 and clk1_out / clk2_out the scan chain.
// Timing: input to output is purely combinational (no register on the data
// path); the configuration changes only while a clock phase is low.
module hyperx_crossbar #(
  parameter int unsigned DIM   = hyperx_pkg::DIM,
  parameter int unsigned PORTS = hyperx_pkg::PORTS,
  parameter int unsigned WIDTH = hyperx_pkg::WIDTH
) (
  input  logic [DIM-1:0][DIM-1:0][PORTS-1:0][WIDTH-1:0] ex_in,
  output logic [DIM-1:0][DIM-1:0][PORTS-1:0][WIDTH-1:0] ex_out,
  input  logic                                          sel_in,
  input  logic                                          clk1,
  input  logic                                          clk2,
  output logic                                          sel_out,
  output logic                                          clk1_out,
  output logic                                          clk2_out
);
  // diag_up[r][c]: diagonal outputs of upper half (r, c)
  // diag_lo[r][c]: diagonal inputs of lower half (r, c)
  // lo_out[r][c]:  mux outputs of lower half (r, c)
  logic [DIM-1:0][DIM-1:0][PORTS-1:0][WIDTH-1:0] diag_up, diag_lo, lo_out;
  logic [2*DIM:0] d, c1, c2;

  // Both diagonal hops: transpose of the matrix position.
  always_comb begin
    for (int r = 0; r < DIM; r++)
      for (int c = 0; c < DIM; c++) begin
        diag_lo[c][r] = diag_up[r][c];
        ex_out[c][r]  = lo_out[r][c];
      end
  end

  assign d[0]  = sel_in;
  assign c1[0] = clk1;
  assign c2[0] = clk2;

  for (genvar r = 0; r < DIM; r++) begin : g_row
    upper_row_block #(.DIM(DIM), .PORTS(PORTS), .WIDTH(WIDTH)) u_upper (
      .ex_in   (ex_in[r]),
      .diag_out(diag_up[r]),
      .sel_in  (d[r]),
      .clk1_in (c1[r]),
      .clk2_in (c2[r]),
      .sel_out (d[r+1]),
      .clk1_out(c1[r+1]),
      .clk2_out(c2[r+1])
    );
    lower_row_block #(.DIM(DIM), .PORTS(PORTS), .WIDTH(WIDTH)) u_lower (
      .diag_in (diag_lo[r]),
      .ex_out  (lo_out[r]),
      .sel_in  (d[DIM+r]),
      .clk1_in (c1[DIM+r]),
      .clk2_in (c2[DIM+r]),
      .sel_out (d[DIM+r+1]),
      .clk1_out(c1[DIM+r+1]),
      .clk2_out(c2[DIM+r+1])
    );
  end

  assign sel_out  = d[2*DIM];
  assign clk1_out = c1[2*DIM];
  assign clk2_out = c2[2*DIM];
endmodule
