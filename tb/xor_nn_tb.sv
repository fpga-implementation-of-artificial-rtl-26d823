// xor_nn_tb: end-to-end test of the XOR perceptron at its default weights.
//
// Evaluates the four XOR patterns (inputs 0 and 1.0) and then random Q3.4
// inputs, comparing result7 and result1 with a
// reference network computed here in plain integer arithmetic (products and
// sums wrapped to 14 bits, hard limiter at zero, decision at 0.5). Every
// evaluation must take exactly 117 rising edges from start to done. It also
// drops enable in the middle of evaluations (abort) and after them (result
// clear) and checks that a following evaluation is still correct.
// Mechanisms counted, each of which must occur at least once: hidden neuron A
// firing and not firing, the same for B (both taken from the reference, the
// output check covering them), output 1 and output 0, an aborted evaluation,
// and outputs cleared by dropping enable.
module xor_nn_tb;
  import xor_nn_pkg::*;

  localparam int LAT = 117;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0;
  fx_t  in1 = '0, in2 = '0;
  fx_t  result7;
  logic result1;
  logic done;

  int checks = 0, failures = 0;
  int n_a1 = 0, n_a0 = 0, n_b1 = 0, n_b0 = 0, n_out1 = 0, n_out0 = 0;
  int n_abort = 0, n_clear = 0;

  xor_nn dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
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

  // Reference neuron: 14-bit wrapped sum of three products, then hard limit.
  function automatic int neuron(input int b, input int w0, input int x1, input int w1,
                                input int x2, input int w2);
    logic signed [13:0] s;
    s = 14'(b * w0) + 14'(x1 * w1) + 14'(x2 * w2);
    return (s < 0) ? 0 : 16;
  endfunction

  task automatic evaluate(input int x1, input int x2);
    int ha, hb, o, edges;
    ha = neuron(16, -24, x1, 16, x2, 16);   // -1.5 + x1 + x2
    hb = neuron(16, -8,  x1, 16, x2, 16);   // -0.5 + x1 + x2
    o  = neuron(16, -8,  ha, -32, hb, 16);  // -0.5 - 2a + b
    in1 = fx_t'(x1);
    in2 = fx_t'(x2);
    @(negedge clk) enable = 1'b1;
    edges = 0;
    do begin
      @(posedge clk);
      edges++;
      #1;
    end while (!done && edges < 1000);
    check(edges == LAT, $sformatf("latency %0d, expected %0d", edges, LAT));
    check(int'(result7) == o && result1 == (o >= 8),
          $sformatf("in=(%0d,%0d) result7=%0d result1=%0b expected %0d",
                    x1, x2, result7, result1, o));
    if (ha != 0) n_a1++; else n_a0++;
    if (hb != 0) n_b1++; else n_b0++;
    if (o != 0) n_out1++; else n_out0++;
    // result must hold while enable stays high
    in1 = fx_t'($urandom_range(0, 127));
    repeat (5) @(posedge clk);
    #1;
    check(done && int'(result7) == o, "result held while enable high");
    @(negedge clk) enable = 1'b0;
    @(posedge clk);
    #1;
    check(!done && result7 == 0 && !result1, "outputs cleared when enable drops");
    n_clear++;
  endtask

  task automatic abort_run(input int cycles);
    in1 = fx_t'(16);
    in2 = fx_t'(16);
    @(negedge clk) enable = 1'b1;
    repeat (cycles) @(posedge clk);
    @(negedge clk) enable = 1'b0;
    @(posedge clk);
    #1;
    check(!done && result7 == 0, "abort leaves no result");
    n_abort++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // XOR truth table
    evaluate(0, 0);
    evaluate(0, 16);
    evaluate(16, 0);
    evaluate(16, 16);
    check(1'b1, "truth table ran");
    // aborts at several points, each followed by a clean evaluation
    abort_run(10);
    evaluate(16, 0);
    abort_run(70);
    evaluate(0, 0);
    abort_run(115);
    evaluate(16, 16);
    // random fixed-point inputs
    for (int i = 0; i < 200; i++)
      evaluate(int'($urandom_range(0, 127)) - 64, int'($urandom_range(0, 127)) - 64);

    $display("mechanisms: A1=%0d A0=%0d B1=%0d B0=%0d out1=%0d out0=%0d abort=%0d clear=%0d",
             n_a1, n_a0, n_b1, n_b0, n_out1, n_out0, n_abort, n_clear);
    check(n_a1 > 0, "hidden A fired");
    check(n_a0 > 0, "hidden A silent");
    check(n_b1 > 0, "hidden B fired");
    check(n_b0 > 0, "hidden B silent");
    check(n_out1 > 0, "output 1 seen");
    check(n_out0 > 0, "output 0 seen");
    check(n_abort > 0, "abort exercised");
    check(n_clear > 0, "clear exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
