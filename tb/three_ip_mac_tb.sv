// three_ip_mac_tb: self-checking test of the sequential signed MAC.
//
// Runs groups of one to four multiply-accumulate requests between accumulator
// clears, with operands from directed corner cases (most negative values,
// zero, +/-1) and random values. Each result is compared with a product and
// wrapped 14-bit sum computed here with ordinary integer arithmetic. Also
// checked: done appears exactly 16 rising edges after the request starts
// (2*DATA_W+2), stays high while enable is held, falls once enable drops, and
// clear empties the accumulator.
module three_ip_mac_tb;
  localparam int DATA_W = 7;
  localparam int ACC_W  = 14;
  localparam int LAT    = 2*DATA_W + 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  logic clear = 1'b0;
  logic signed [DATA_W-1:0] mr = '0, md = '0;
  logic done;
  logic signed [ACC_W-1:0] mac_result;

  int checks = 0, failures = 0;

  three_ip_mac #(.DATA_W(DATA_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected wrapped accumulator value.
  int ref_acc;

  function automatic int wrap(input int v);
    logic signed [ACC_W-1:0] t;
    t = ACC_W'(v);
    return int'(t);
  endfunction

  task automatic do_clear();
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    ref_acc = 0;
    check(mac_result == 0, "accumulator cleared");
  endtask

  task automatic mac_op(input int a, input int b);
    int edges;
    mr = DATA_W'(a);
    md = DATA_W'(b);
    @(negedge clk) enable = 1'b1;
    edges = 0;
    do begin
      @(posedge clk);
      edges++;
      #1;
    end while (!done && edges < 100);
    ref_acc = wrap(ref_acc + a * b);
    check(edges == LAT, $sformatf("latency %0d, expected %0d", edges, LAT));
    check(int'(mac_result) == ref_acc,
          $sformatf("%0d*%0d: result %0d, expected %0d", a, b, mac_result, ref_acc));
    // done must be held while enable stays high, without further adds
    repeat (3) @(posedge clk);
    #1;
    check(done && int'(mac_result) == ref_acc, "done and result held");
    @(negedge clk) enable = 1'b0;
    @(posedge clk);
    #1;
    check(!done, "done falls after enable drops");
  endtask

  function automatic int rnd7();
    return int'($urandom_range(0, 127)) - 64;
  endfunction

  initial begin
    ref_acc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do_clear();
    // directed corner cases, each on its own
    begin
      int ca [8] = '{-64, -64, 63, -1, 0, 1, -24, 16};
      int cb [8] = '{-64, 63, 63, -1, 45, -64, 16, -32};
      for (int i = 0; i < 8; i++) begin
        do_clear();
        mac_op(ca[i], cb[i]);
      end
    end
    // the document's bias term: 1.0 * -1.5 = -1.5 in Q6.8 (-384)
    do_clear();
    mac_op(16, -24);
    check(mac_result == -384, "bias term 1.0 * -1.5");
    // random groups, including sums that wrap past 14 bits
    for (int g = 0; g < 300; g++) begin
      int n = int'($urandom_range(1, 4));
      do_clear();
      for (int k = 0; k < n; k++) mac_op(rnd7(), rnd7());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
