// Lower row block: the DIM lower sub-switch halves of one matrix row.
//
// Holds the row-wise wiring of the last hop. Track k of every half in the row
// is a horizontal line that reaches the k-th 8:1 mux of every half in the
// row, so half c' sees row_in2[k][c] = row_out2[k] of half c. Data arriving
// on any diagonal input of the row can thus leave on external output k of any
// half of the row, provided it was put on track k. The scan chain runs
// through the halves in column order 0 .. DIM-1 (this design's choice).
//
// Interface: diag_in[DIM][PORTS] (column, port), ex_out[DIM][PORTS]; the
// serial scan port and the two clock phases in and out.
// Timing: data paths are combinational.
module lower_row_block #(
  parameter int unsigned DIM   = hyperx_pkg::DIM,
  parameter int unsigned PORTS = hyperx_pkg::PORTS,
  parameter int unsigned WIDTH = hyperx_pkg::WIDTH
) (
  input  logic [DIM-1:0][PORTS-1:0][WIDTH-1:0] diag_in,
  output logic [DIM-1:0][PORTS-1:0][WIDTH-1:0] ex_out,
  input  logic                                 sel_in,
  input  logic                                 clk1_in,
  input  logic                                 clk2_in,
  output logic                                 sel_out,
  output logic                                 clk1_out,
  output logic                                 clk2_out
);
  logic [DIM-1:0][PORTS-1:0][WIDTH-1:0] track;     // [column][track]
  logic [PORTS-1:0][DIM-1:0][WIDTH-1:0] row_bus;   // [track][column]
  logic [DIM:0] d, c1, c2;

  always_comb begin
    for (int k = 0; k < PORTS; k++)
      for (int c = 0; c < DIM; c++)
        row_bus[k][c] = track[c][k];
  end

  assign d[0]  = sel_in;
  assign c1[0] = clk1_in;
  assign c2[0] = clk2_in;

  for (genvar c = 0; c < DIM; c++) begin : g_col
    lower_sub_switch #(.DIM(DIM), .PORTS(PORTS), .WIDTH(WIDTH)) u_half (
      .diag_in (diag_in[c]),
      .row_in2 (row_bus),
      .row_out2(track[c]),
      .ex_out  (ex_out[c]),
      .sel_in  (d[c]),
      .clk1_in (c1[c]),
      .clk2_in (c2[c]),
      .sel_out (d[c+1]),
      .clk1_out(c1[c+1]),
      .clk2_out(c2[c+1])
    );
  end

  assign sel_out  = d[DIM];
  assign clk1_out = c1[DIM];
  assign clk2_out = c2[DIM];
endmodule
