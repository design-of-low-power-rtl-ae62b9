// Self-checking test of upper_row_block: configures all eight halves of the
// row through the scan chain (column 0 first in the chain) and checks that
// diagonal output k of half c' carries the external input that the chosen
// source column put on track k.
module tb_upper_row_block;
  localparam int unsigned D  = hyperx_pkg::DIM;
  localparam int unsigned P  = hyperx_pkg::PORTS;
  localparam int unsigned W  = hyperx_pkg::WIDTH;
  localparam int unsigned H  = hyperx_pkg::HALF_SEL_BITS;
  localparam int unsigned NT = D * H;
  logic [D-1:0][P-1:0][W-1:0] ex_in, diag_out;
  logic sel_in, clk1, clk2, sel_out, clk1_out, clk2_out;
  int checks = 0, failures = 0;

  upper_row_block dut (.ex_in, .diag_out, .sel_in, .clk1_in(clk1), .clk2_in(clk2),
                       .sel_out, .clk1_out, .clk2_out);

  task automatic shift(input logic b);
    sel_in = b;
    #1 clk1 = 0; #1 clk1 = 1; #1 clk2 = 0; #1 clk2 = 1; #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NT-1:0] cfg;
    int pj[D][P], pc[D][P];
    clk1 = 1; clk2 = 1; sel_in = 0;
    for (int t = 0; t < 8; t++) begin
      cfg = '0;
      for (int c = 0; c < D; c++)
        for (int k = 0; k < P; k++) begin
          pj[c][k] = $urandom_range(P-1);
          pc[c][k] = $urandom_range(D-1);
          cfg[c*H + k*P + pj[c][k]] = 1'b1;
          cfg[c*H + P*P + k*D + pc[c][k]] = 1'b1;
        end
      for (int s = 0; s < NT; s++) shift(cfg[NT-1-s]);
      repeat (10) begin
        for (int c = 0; c < D; c++)
          for (int j = 0; j < P; j++) ex_in[c][j] = W'($urandom);
        #1;
        for (int c = 0; c < D; c++)
          for (int k = 0; k < P; k++) begin
            checks++;
            if (diag_out[c][k] !== ex_in[pc[c][k]][pj[pc[c][k]][k]]) begin
              failures++;
              $display("FAIL diag_out[%0d][%0d]", c, k);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
