// Self-checking test of scan_latch: transparent (inverting) while clk is low,
// holding while clk is high.
module tb_scan_latch;
  logic a, clk, y;
  int checks = 0, failures = 0;

  scan_latch dut (.a, .clk, .y);

  task automatic check(input logic exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: y=%b expected %b", what, y, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held;
    clk = 0; a = 0; #1;
    check(1'b1, "transparent a=0");
    a = 1; #1;
    check(1'b0, "transparent a=1");
    for (int i = 0; i < 200; i++) begin
      // capture a random value, then wiggle a while clk is high
      clk = 0; a = 1'($urandom); #1;
      check(~a, "transparent follow");
      held = a;
      clk = 1; #1;
      repeat (3) begin
        a = 1'($urandom); #1;
        check(~held, "hold while clk high");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
