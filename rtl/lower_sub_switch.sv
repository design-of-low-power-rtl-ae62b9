// Lower half of a sub-switch: the hops after the diagonal.
//
// The four diagonal inputs arrive from the upper half at the transposed
// matrix position. The lower mux stage's four 4:1 muxes put any diagonal
// input onto any of the four row tracks (row_out2); its four 8:1 muxes take,
// for track k, the track-k output of one of the eight lower halves of the
// same row and drive external output ex_out[k]. The 48 select lines come from
// this half's scan chain, with the same layout as in upper_sub_switch.
//
// Interface: diag_in[PORTS], row_in2[PORTS][DIM] (row_in2[k][c] = track k of
// the half in column c), row_out2[PORTS], ex_out[PORTS]; sel_in/clk1_in/clk2_in
// and sel_out/clk1_out/clk2_out of the scan chain.
// Timing: data paths are combinational; configuration as in scan_chain.
module lower_sub_switch #(
  parameter int unsigned DIM   = hyperx_pkg::DIM,
  parameter int unsigned PORTS = hyperx_pkg::PORTS,
  parameter int unsigned WIDTH = hyperx_pkg::WIDTH
) (
  input  logic [PORTS-1:0][WIDTH-1:0]          diag_in,
  input  logic [PORTS-1:0][DIM-1:0][WIDTH-1:0] row_in2,
  output logic [PORTS-1:0][WIDTH-1:0]          row_out2,
  output logic [PORTS-1:0][WIDTH-1:0]          ex_out,
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
    .local_in(diag_in),
    .row_in  (row_in2),
    .sel_row (sel[PORTS*PORTS-1:0]),
    .sel_col (sel[NSEL-1:PORTS*PORTS]),
    .row_out (row_out2),
    .mux_out (ex_out)
  );
endmodule
