// Longest-route test of the full-size crossbar.
//
// Routes the four inputs of the corner sub-switch (0, 0) along the longest
// wires of the floorplan: across the whole first row to upper half (0, 7),
// over the diagonal link to lower half (7, 0), across the whole row to lower
// half (7, 7), and out at sub-switch (7, 7) after the final transposed hop.
// Each word passes 4:1, 8:1, 4:1 and 8:1 muxes, the critical path of the
// design. Input j uses track pk[j] and leaves on port pm[j], with pk and pm
// random permutations of 0..3 for each of several trials. All other muxes are
// left unselected, so every other output must read 0.
module tb_critical_path;
  localparam int unsigned D  = hyperx_pkg::DIM;
  localparam int unsigned P  = hyperx_pkg::PORTS;
  localparam int unsigned W  = hyperx_pkg::WIDTH;
  localparam int unsigned H  = hyperx_pkg::HALF_SEL_BITS;
  localparam int unsigned NT = hyperx_pkg::TOTAL_SEL_BITS;

  logic [D-1:0][D-1:0][P-1:0][W-1:0] ex_in, ex_out;
  logic sel_in, clk1, clk2, sel_out, clk1_out, clk2_out;
  int checks = 0, failures = 0;

  hyperx_crossbar dut (.ex_in, .ex_out, .sel_in, .clk1, .clk2,
                       .sel_out, .clk1_out, .clk2_out);

  function automatic int stage(int half, int row, int col, int bitpos);
    return ((half * D + row) * D + col) * H + bitpos;
  endfunction

  task automatic shift(input logic b);
    sel_in = b;
    #1 clk1 = 0; #1 clk1 = 1; #1 clk2 = 0; #1 clk2 = 1; #1;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NT-1:0] cfg;
    int pk[P], pm[P], x, tmp;
    logic [W-1:0] exp_w;
    clk1 = 1; clk2 = 1; sel_in = 0; ex_in = '0;
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < P; i++) begin pk[i] = i; pm[i] = i; end
      for (int i = P - 1; i > 0; i--) begin
        x = $urandom_range(i); tmp = pk[i]; pk[i] = pk[x]; pk[x] = tmp;
        x = $urandom_range(i); tmp = pm[i]; pm[i] = pm[x]; pm[x] = tmp;
      end
      cfg = '0;
      for (int j = 0; j < P; j++) begin
        cfg[stage(0, 0, 0, pk[j]*P + j)] = 1'b1;                 // upper (0,0): input j -> track pk
        cfg[stage(0, 0, D-1, P*P + pk[j]*D + 0)] = 1'b1;         // upper (0,7): column 0 -> diag pk
        cfg[stage(1, D-1, 0, pm[j]*P + pk[j])] = 1'b1;           // lower (7,0): diag pk -> track pm
        cfg[stage(1, D-1, D-1, P*P + pm[j]*D + 0)] = 1'b1;       // lower (7,7): column 0 -> port pm
      end
      for (int s = 0; s < NT; s++) shift(cfg[NT-1-s]);
      repeat (20) begin
        for (int r = 0; r < D; r++)
          for (int c = 0; c < D; c++)
            for (int j = 0; j < P; j++) ex_in[r][c][j] = W'($urandom);
        #1;
        for (int r = 0; r < D; r++)
          for (int c = 0; c < D; c++)
            for (int m = 0; m < P; m++) begin
              exp_w = '0;
              if (r == D-1 && c == D-1)
                for (int j = 0; j < P; j++)
                  if (pm[j] == m) exp_w = ex_in[0][0][j];
              checks++;
              if (ex_out[r][c][m] !== exp_w) begin
                failures++;
                if (failures < 10)
                  $display("FAIL output (%0d,%0d,%0d): %h expected %h", r, c, m, ex_out[r][c][m], exp_w);
              end
            end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
