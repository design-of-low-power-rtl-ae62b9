// Self-checking test of mux_stage at its default size: random one-hot
// selects; each row mux k must pass local input j, each 8:1 mux k must pass
// the track-k word of the chosen column.
module tb_mux_stage;
  localparam int unsigned D = hyperx_pkg::DIM;
  localparam int unsigned P = hyperx_pkg::PORTS;
  localparam int unsigned W = hyperx_pkg::WIDTH;
  logic [P-1:0][W-1:0]        local_in;
  logic [P-1:0][D-1:0][W-1:0] row_in;
  logic [P-1:0][P-1:0]        sel_row;
  logic [P-1:0][D-1:0]        sel_col;
  logic [P-1:0][W-1:0]        row_out, mux_out;
  int checks = 0, failures = 0;

  mux_stage dut (.local_in, .row_in, .sel_row, .sel_col, .row_out, .mux_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pick_j[P], pick_c[P];
    for (int t = 0; t < 300; t++) begin
      for (int j = 0; j < P; j++) local_in[j] = W'($urandom);
      for (int k = 0; k < P; k++)
        for (int c = 0; c < D; c++) row_in[k][c] = W'($urandom);
      for (int k = 0; k < P; k++) begin
        pick_j[k] = $urandom_range(P-1);
        pick_c[k] = $urandom_range(D-1);
        sel_row[k] = P'(1) << pick_j[k];
        sel_col[k] = D'(1) << pick_c[k];
      end
      #1;
      for (int k = 0; k < P; k++) begin
        checks += 2;
        if (row_out[k] !== local_in[pick_j[k]]) begin
          failures++;
          $display("FAIL row mux %0d", k);
        end
        if (mux_out[k] !== row_in[k][pick_c[k]]) begin
          failures++;
          $display("FAIL 8:1 mux %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
