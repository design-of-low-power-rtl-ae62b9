// Upper half of a sub-switch: the hops before the diagonal.
//
// The four external inputs pass the input drivers (an electrical buffer with
// no logic effect, so they are plain wires here) into the upper mux stage.
// Its four 4:1 muxes put any external input onto any of the four row tracks
// (row_out1); its four 8:1 muxes take, for track k, the track-k output of one
// of the eight upper halves of the same row and send it to the diagonal
// output diag_out[k], which the top wires to the lower half at the transposed
// matrix position. The 48 select lines come from this half's scan chain.
//
// Scan bit layout (this design's choice): chain stage k*PORTS + j selects
// external input j for row mux k; stage PORTS*PORTS + k*DIM + c selects row
// column c for diagonal mux k.
//
// Interface: ex_in[PORTS], row_in1[PORTS][DIM] (row_in1[k][c] = track k of the
// half in column c), row_out1[PORTS], diag_out[PORTS]; sel_in/clk1_in/clk2_in
// and sel_out/clk1_out/clk2_out of the scan chain.
// Timing: data paths are combinational; configuration as in scan_chain.
module upper_sub_switch #(
  parameter int unsigned DIM   = hyperx_pkg::DIM,
  parameter int unsigned PORTS = hyperx_pkg::PORTS,
  parameter int unsigned WIDTH = hyperx_pkg::WIDTH
) (
  input  logic [PORTS-1:0][WIDTH-1:0]          ex_in,
  input  logic [PORTS-1:0][DIM-1:0][WIDTH-1:0] row_in1,
  output logic [PORTS-1:0][WIDTH-1:0]          row_out1,
  output logic [PORTS-1:0][WIDTH-1:0]          diag_out,
  input  logic                                 sel_in,
  input  logic                                 clk1_in,
  input  logic                                 clk2_in,
  output logic                                 sel_out,
  output logic                                 clk1_out,
  output logic                                 clk2_out
);
  localparam int unsigned NSEL = hyperx_pkg::half_sel_bits(DIM, PORTS);

  logic [NSEL-1:0] sel;

  scan_chain #(.NBITS(NSEL)) u_scan (
    .sel_in, .clk1_in, .clk2_in, .sel_out, .clk1_out, .clk2_out, .sel
  );

  mux_stage #(.DIM(DIM), .PORTS(PORTS), .WIDTH(WIDTH)) u_mux (
    .local_in(ex_in),
    .row_in  (row_in1),
    .sel_row (sel[PORTS*PORTS-1:0]),
    .sel_col (sel[NSEL-1:PORTS*PORTS]),
    .row_out (row_out1),
    .mux_out (diag_out)
  );
endmodule
