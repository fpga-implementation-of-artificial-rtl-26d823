// activation_function_tb: self-checking test of the registered hard limiter.
//
// Drives directed values around zero and the extremes of the 14-bit input,
// then random values, and checks that one cycle later the output is 0 for a
// negative input and 16 (1.0) otherwise. With enable low the output must
// hold its previous value whatever the input does.
module activation_function_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  logic signed [13:0] din = '0;
  logic [6:0] dout;
  int checks = 0, failures = 0;

  activation_function dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v, input bit en);
    logic [6:0] prev;
    logic [6:0] exp;
    prev = dout;
    @(negedge clk);
    din = 14'(v);
    enable = en;
    @(negedge clk);
    exp = en ? ((v < 0) ? 7'd0 : 7'd16) : prev;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL: din=%0d en=%0b dout=%0d expected %0d", v, en, dout, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (dout != 0) begin
      failures++;
      $display("FAIL: output not cleared by reset");
    end
    rst_n = 1'b1;
    apply(0, 1'b1);
    apply(-1, 1'b1);
    apply(1, 1'b1);
    apply(-8192, 1'b1);
    apply(8191, 1'b1);
    apply(-5, 1'b0);   // held at 16
    apply(-5, 1'b1);
    apply(100, 1'b0);  // held at 0
    for (int i = 0; i < 2000; i++)
      apply(int'($urandom_range(0, 16383)) - 8192, ($urandom_range(0, 3) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
