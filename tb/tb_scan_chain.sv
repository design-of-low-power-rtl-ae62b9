// Self-checking test of scan_chain at its default length: shifts random
// patterns in, checks the parallel select outputs (the first bit shifted in
// must land in the last stage) and the serial output, which must replay the
// previous pattern bit by bit.
module tb_scan_chain;
  localparam int unsigned N = hyperx_pkg::HALF_SEL_BITS;
  logic sel_in, clk1, clk2, sel_out, clk1_out, clk2_out;
  logic [N-1:0] sel;
  int checks = 0, failures = 0;

  scan_chain dut (.sel_in, .clk1_in(clk1), .clk2_in(clk2),
                  .sel_out, .clk1_out, .clk2_out, .sel);

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
    logic [N-1:0] pat, prev;
    clk1 = 1; clk2 = 1; sel_in = 0;
    prev = '0;
    for (int i = 0; i < N; i++) shift(1'b0);
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < N; i++) pat[i] = 1'($urandom);
      // bit for stage g is shifted at step N-1-g
      for (int s = 0; s < N; s++) begin
        checks++;
        if (sel_out !== prev[N-1-s]) begin
          failures++;
          $display("FAIL serial out step %0d", s);
        end
        shift(pat[N-1-s]);
      end
      checks++;
      if (sel !== pat) begin
        failures++;
        $display("FAIL parallel %h expected %h", sel, pat);
      end
      checks++;
      if (clk1_out !== clk1 || clk2_out !== clk2) begin
        failures++;
        $display("FAIL clock out");
      end
      prev = pat;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
