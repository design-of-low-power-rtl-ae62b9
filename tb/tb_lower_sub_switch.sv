// Self-checking test of lower_sub_switch: loads random one-hot selects
// through the scan chain, drives random words and checks that row_out2[k]
// carries the chosen diagonal input and ex_out[k] the chosen row word.
// The serial output must replay the previous configuration.
module tb_lower_sub_switch;
  localparam int unsigned D = hyperx_pkg::DIM;
  localparam int unsigned P = hyperx_pkg::PORTS;
  localparam int unsigned W = hyperx_pkg::WIDTH;
  localparam int unsigned N = hyperx_pkg::HALF_SEL_BITS;
  logic [P-1:0][W-1:0]        diag_in, row_out2, ex_out;
  logic [P-1:0][D-1:0][W-1:0] row_in2;
  logic sel_in, clk1, clk2, sel_out, clk1_out, clk2_out;
  int checks = 0, failures = 0;

  lower_sub_switch dut (.diag_in, .row_in2, .row_out2, .ex_out,
                        .sel_in, .clk1_in(clk1), .clk2_in(clk2),
                        .sel_out, .clk1_out, .clk2_out);

  task automatic shift(input logic b);
    sel_in = b;
    #1 clk1 = 0; #1 clk1 = 1; #1 clk2 = 0; #1 clk2 = 1; #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] cfg, prev;
    int pj[P], pc[P];
    clk1 = 1; clk2 = 1; sel_in = 0; prev = '0;
    for (int i = 0; i < N; i++) shift(1'b0);
    for (int t = 0; t < 20; t++) begin
      cfg = '0;
      for (int k = 0; k < P; k++) begin
        pj[k] = $urandom_range(P-1);
        pc[k] = $urandom_range(D-1);
        cfg[k*P + pj[k]] = 1'b1;
        cfg[P*P + k*D + pc[k]] = 1'b1;
      end
      for (int s = 0; s < N; s++) begin
        checks++;
        if (sel_out !== prev[N-1-s]) begin
          failures++;
          $display("FAIL serial out");
        end
        shift(cfg[N-1-s]);
      end
      prev = cfg;
      repeat (10) begin
        for (int j = 0; j < P; j++) diag_in[j] = W'($urandom);
        for (int k = 0; k < P; k++)
          for (int c = 0; c < D; c++) row_in2[k][c] = W'($urandom);
        #1;
        for (int k = 0; k < P; k++) begin
          checks += 2;
          if (row_out2[k] !== diag_in[pj[k]]) begin
            failures++;
            $display("FAIL row_out2[%0d]", k);
          end
          if (ex_out[k] !== row_in2[k][pc[k]]) begin
            failures++;
            $display("FAIL ex_out[%0d]", k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
