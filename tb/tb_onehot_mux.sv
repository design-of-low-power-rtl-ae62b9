// Self-checking test of onehot_mux with 4 and 8 inputs: every one-hot select
// must pass its input; an all-zero select gives 0.
module tb_onehot_mux;
  localparam int unsigned W = 16;
  logic [3:0][W-1:0] din4;
  logic [7:0][W-1:0] din8;
  logic [3:0] sel4;
  logic [7:0] sel8;
  logic [W-1:0] dout4, dout8;
  int checks = 0, failures = 0;

  onehot_mux #(.N(4), .WIDTH(W)) dut4 (.din(din4), .sel(sel4), .dout(dout4));
  onehot_mux #(.N(8), .WIDTH(W)) dut8 (.din(din8), .sel(sel8), .dout(dout8));

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
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
    int i4, i8;
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < 4; i++) din4[i] = W'($urandom);
      for (int i = 0; i < 8; i++) din8[i] = W'($urandom);
      i4 = $urandom_range(3);
      i8 = $urandom_range(7);
      sel4 = 4'b1 << i4;
      sel8 = 8'b1 << i8;
      #1;
      check(dout4, din4[i4], "4:1");
      check(dout8, din8[i8], "8:1");
    end
    sel4 = '0; sel8 = '0; #1;
    check(dout4, '0, "4:1 none selected");
    check(dout8, '0, "8:1 none selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
