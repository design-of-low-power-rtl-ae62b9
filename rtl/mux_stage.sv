// Mux stage of a sub-switch half: four 4:1 muxes and four 8:1 muxes.
//
// The same stage serves the upper and the lower half. The PORTS row muxes
// each pick one of the PORTS local inputs (the buffered external inputs in an
// upper half, the diagonal inputs in a lower half) and drive row_out[k] onto
// track k of the row. The PORTS column muxes each pick, for track k, one of
// the DIM sub-switches of the row: mux k sees only row_in[k][0..DIM-1], the
// track-k outputs of all DIM sub-switches in the row (the "signal ordering"
// restriction), and drives mux_out[k] (the diagonal output of an upper half,
// the external output of a lower half).
//
// Interface: local_in[PORTS], row_in[PORTS][DIM], sel_row[PORTS][PORTS] and
// sel_col[PORTS][DIM] one-hot selects; row_out[PORTS], mux_out[PORTS].
// Timing: purely combinational.
module mux_stage #(
  parameter int unsigned DIM   = hyperx_pkg::DIM,
  parameter int unsigned PORTS = hyperx_pkg::PORTS,
  parameter int unsigned WIDTH = hyperx_pkg::WIDTH
) (
  input  logic [PORTS-1:0][WIDTH-1:0]          local_in,
  input  logic [PORTS-1:0][DIM-1:0][WIDTH-1:0] row_in,
  input  logic [PORTS-1:0][PORTS-1:0]          sel_row,
  input  logic [PORTS-1:0][DIM-1:0]            sel_col,
  output logic [PORTS-1:0][WIDTH-1:0]          row_out,
  output logic [PORTS-1:0][WIDTH-1:0]          mux_out
);
  for (genvar k = 0; k < PORTS; k++) begin : g_mux
    onehot_mux #(.N(PORTS), .WIDTH(WIDTH)) u_row_mux (
      .din (local_in),
      .sel (sel_row[k]),
      .dout(row_out[k])
    );
    onehot_mux #(.N(DIM), .WIDTH(WIDTH)) u_col_mux (
      .din (row_in[k]),
      .sel (sel_col[k]),
      .dout(mux_out[k])
    );
  end
endmodule
