// Self-checking test of scan_cell: a bit presented at sel_in appears at
// sel_out only after a clk1 low pulse followed by a clk2 low pulse; neither
// phase alone moves it. The clock phases must pass through unchanged.
module tb_scan_cell;
  logic sel_in, clk1, clk2, sel_out, clk1_out, clk2_out, sel;
  int checks = 0, failures = 0;

  scan_cell dut (
    .sel_in, .clk1_in(clk1), .clk2_in(clk2),
    .sel_out, .clk1_out, .clk2_out, .sel
  );

  task automatic expect_bit(input logic exp, input string what);
    checks++;
    if (sel_out !== exp || sel !== exp) begin
      failures++;
      $display("FAIL %s: sel_out=%b sel=%b expected %b", what, sel_out, sel, exp);
    end
  endtask

  task automatic expect_clocks();
    checks++;
    if (clk1_out !== clk1 || clk2_out !== clk2) begin
      failures++;
      $display("FAIL clock pass-through");
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cur, nxt;
    clk1 = 1; clk2 = 1; sel_in = 0;
    // initialise: shift a 0 in
    #1 clk1 = 0; #1 clk1 = 1; #1 clk2 = 0; #1 clk2 = 1; #1;
    expect_bit(1'b0, "init");
    cur = 0;
    for (int i = 0; i < 300; i++) begin
      nxt = 1'($urandom);
      sel_in = nxt; #1;
      expect_bit(cur, "idle, new input waiting");
      clk1 = 0; #1; expect_clocks();
      clk1 = 1; #1;
      expect_bit(cur, "after clk1 only");
      sel_in = 1'($urandom); #1;   // input may change after clk1
      clk2 = 0; #1; expect_clocks();
      expect_bit(nxt, "clk2 transparent");
      clk2 = 1; #1;
      expect_bit(nxt, "after clk2");
      cur = nxt;
      // a clk2 pulse on its own must not move new data
      sel_in = ~cur; #1;
      clk2 = 0; #1; clk2 = 1; #1;
      expect_bit(cur, "clk2 pulse alone");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
