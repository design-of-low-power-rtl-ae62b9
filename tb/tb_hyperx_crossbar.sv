// End-to-end test of the full 256-radix, 16-bit Hyper-X crossbar at its
// default size.
//
// For each trial the test draws a random full permutation of the 256 inputs
// onto the 256 outputs from a family that the restricted routing can carry,
// works out every mux select of that route on its own, shifts the 6144
// configuration bits through the scan chain and then drives random words,
// checking that every output carries the word of the input routed to it.
//
// The route of input (r, c, j) is chosen as: track k = pi[r][c][j]; diagonal
// link to row R = sigma[r][k][c]; output port m = tau[r][R][k]; destination
// column C = rho[R][m][r] of the lower row block, where pi, tau are random
// permutations of 0..3 and sigma, rho random permutations of 0..7. Lower half
// (R, C) output m is external output m of sub-switch (C, R) after the last,
// transposed hop. Every source row then sends exactly one word per (lower
// row, port) pair, which is what the diagonal links and the lower row hops
// allow.
//
// Counted mechanisms (each must occur): reconfiguration through the scan
// chain, serial read-back of the previous configuration, row hops to another
// column and to the own column in both row blocks, diagonal hops between two
// different rows and from a row to itself (the diagonal sub-switches).
// The data path has no clock: outputs are checked one time step after the
// inputs change, with the clock phases held idle.
module tb_hyperx_crossbar;
  localparam int unsigned D  = hyperx_pkg::DIM;
  localparam int unsigned P  = hyperx_pkg::PORTS;
  localparam int unsigned W  = hyperx_pkg::WIDTH;
  localparam int unsigned H  = hyperx_pkg::HALF_SEL_BITS;
  localparam int unsigned NT = hyperx_pkg::TOTAL_SEL_BITS;
  localparam int unsigned TRIALS = 3;

  logic [D-1:0][D-1:0][P-1:0][W-1:0] ex_in, ex_out;
  logic sel_in, clk1, clk2, sel_out, clk1_out, clk2_out;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_reconfig = 0, n_readback = 0;
  int n_row1_cross = 0, n_row1_local = 0, n_row2_cross = 0, n_row2_local = 0;
  int n_diag_cross = 0, n_diag_self = 0;

  hyperx_crossbar dut (.ex_in, .ex_out, .sel_in, .clk1, .clk2,
                       .sel_out, .clk1_out, .clk2_out);

  logic [NT-1:0] cfg, prev_cfg;
  // source of every lower-half output: flat input index r*D*P + c*P + j
  int src_of[D][D][P];

  function automatic int stage(int half, int row, int col, int bitpos);
    return ((half * D + row) * D + col) * H + bitpos;
  endfunction

  task automatic shift(input logic b);
    sel_in = b;
    #1 clk1 = 0; #1 clk1 = 1; #1 clk2 = 0; #1 clk2 = 1; #1;
  endtask

  task automatic rand_perm(output int p[], input int n);
    int tmp, x;
    p = new[n];
    for (int i = 0; i < n; i++) p[i] = i;
    for (int i = n - 1; i > 0; i--) begin
      x = $urandom_range(i);
      tmp = p[i]; p[i] = p[x]; p[x] = tmp;
    end
  endtask

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic build_route();
    int pi_[D][D][], sigma[D][P][], tau[D][D][], rho[D][P][];
    int k, R, m, C;
    bit used[D][D][P];
    for (int r = 0; r < D; r++)
      for (int c = 0; c < D; c++) rand_perm(pi_[r][c], P);
    for (int r = 0; r < D; r++)
      for (int kk = 0; kk < P; kk++) rand_perm(sigma[r][kk], D);
    for (int r = 0; r < D; r++)
      for (int rr = 0; rr < D; rr++) rand_perm(tau[r][rr], P);
    for (int rr = 0; rr < D; rr++)
      for (int mm = 0; mm < P; mm++) rand_perm(rho[rr][mm], D);
    cfg = '0;
    foreach (used[a, b, e]) used[a][b][e] = 0;
    for (int r = 0; r < D; r++)
      for (int c = 0; c < D; c++)
        for (int j = 0; j < P; j++) begin
          k = pi_[r][c][j];
          R = sigma[r][k][c];
          m = tau[r][R][k];
          C = rho[R][m][r];
          // upper (r,c) row mux k takes external input j
          cfg[stage(0, r, c, k*P + j)] = 1'b1;
          // upper (r,R) 8:1 mux k takes column c
          cfg[stage(0, r, R, P*P + k*D + c)] = 1'b1;
          // lower (R,r) row mux m takes diagonal input k
          cfg[stage(1, R, r, m*P + k)] = 1'b1;
          // lower (R,C) 8:1 mux m takes column r
          cfg[stage(1, R, C, P*P + m*D + r)] = 1'b1;
          if (used[R][C][m]) fail("route generator produced a collision");
          used[R][C][m] = 1;
          src_of[R][C][m] = (r * D + c) * P + j;
          if (c != R) n_row1_cross++; else n_row1_local++;
          if (r != C) n_row2_cross++; else n_row2_local++;
          if (r != R) n_diag_cross++; else n_diag_self++;
        end
  endtask

  initial begin
    #50000000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    clk1 = 1; clk2 = 1; sel_in = 0; ex_in = '0;
    prev_cfg = '0;
    for (int i = 0; i < NT; i++) shift(1'b0);
    for (int t = 0; t < TRIALS; t++) begin
      build_route();
      for (int i = 0; i < NT; i++) begin
        checks++;
        if (sel_out !== prev_cfg[NT-1-i]) fail($sformatf("read-back bit %0d", i));
        shift(cfg[NT-1-i]);
      end
      checks++;
      if (t > 0) n_readback++;
      n_reconfig++;
      prev_cfg = cfg;
      repeat (16) begin
        for (int r = 0; r < D; r++)
          for (int c = 0; c < D; c++)
            for (int j = 0; j < P; j++) ex_in[r][c][j] = W'($urandom);
        #1;
        for (int r = 0; r < D; r++)
          for (int c = 0; c < D; c++)
            for (int m = 0; m < P; m++) begin
              s = src_of[c][r][m];   // ex_out (r,c) is lower half (c,r)
              checks++;
              if (ex_out[r][c][m] !== ex_in[s / (D*P)][(s / P) % D][s % P])
                fail($sformatf("output (%0d,%0d,%0d) trial %0d", r, c, m, t));
            end
      end
    end
    $display("mechanisms: reconfig=%0d readback=%0d row1_cross=%0d row1_local=%0d row2_cross=%0d row2_local=%0d diag_cross=%0d diag_self=%0d",
             n_reconfig, n_readback, n_row1_cross, n_row1_local, n_row2_cross, n_row2_local,
             n_diag_cross, n_diag_self);
    checks++; if (n_reconfig == 0)   fail("no reconfiguration");
    checks++; if (n_readback == 0)   fail("no read-back");
    checks++; if (n_row1_cross == 0) fail("no upper cross-column hop");
    checks++; if (n_row1_local == 0) fail("no upper own-column hop");
    checks++; if (n_row2_cross == 0) fail("no lower cross-column hop");
    checks++; if (n_row2_local == 0) fail("no lower own-column hop");
    checks++; if (n_diag_cross == 0) fail("no diagonal hop between rows");
    checks++; if (n_diag_self == 0)  fail("no diagonal hop within a row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
