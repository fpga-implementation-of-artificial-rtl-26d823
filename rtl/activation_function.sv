// activation_function: registered hard-limiter transfer function.
//
// The neuron's weighted sum din (signed, Q6.8 in the default 14 bits) is
// mapped to 0 when it is negative and to ONE (the fixed-point 1.0 of the
// neuron signals, 16 in Q3.4) otherwise. The result is registered: while
// enable is high, dout takes the value for the din sampled at that rising
// edge, so it is valid one cycle after din; while enable is low dout holds.
// The threshold at zero and the two output values follow the published
// design; the asynchronous reset to 0 is this design's own.
module activation_function #(
  parameter int unsigned IN_W  = 14,
  parameter int unsigned OUT_W = 7,
  parameter int unsigned ONE   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic signed [IN_W-1:0]  din,
  output logic        [OUT_W-1:0] dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      dout <= '0;
    else if (enable)
      dout <= (din < 0) ? '0 : OUT_W'(ONE);
  end

endmodule
