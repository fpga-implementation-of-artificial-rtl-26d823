// xor_nn: fixed-weight 2-2-1 multilayer perceptron that evaluates XOR.
//
// The network has two inputs, two hidden neurons and one output neuron, each
// neuron computing a bias term plus two weighted inputs and passing the sum
// through a hard limiter (0 below zero, 1.0 otherwise). With the default
// weights hidden neuron A is an AND (-1.5 + x1 + x2), hidden neuron B an OR
// (-0.5 + x1 + x2), and the output neuron -0.5 - 2*A + B is XOR.
//
// Hardware is reused rather than replicated: two sequential MAC units
// (three_ip_mac) and one activation_function, sequenced by a state machine.
//   Layer 1: both MACs are cleared, then three terms are accumulated in
//            parallel, MAC A for neuron A and MAC B for neuron B: bias input
//            (1.0) times bias weight, in1 times weight, in2 times weight.
//            The shared activation unit then limits sum A, then sum B.
//   Layer 2: MAC A is cleared and reused for the output neuron with the two
//            hidden outputs as inputs; its limited sum is result7, and
//            result1 is result7 >= THRESH (0.5).
// Between two MAC terms the controller drops the MAC enable for one cycle
// (the MAC's request handshake). The operation order, the weights, the
// number format (Q3.4, see xor_nn_pkg) and the enable/done behaviour follow
// the published design; the state encoding, the input registers and the
// reset are this design's own.
//
// Interface and timing:
//   enable  while high, the network is evaluated once on in1/in2 as sampled
//           at the start; done then rises and result7/result1 hold until
//           enable is dropped. Dropping enable aborts a running evaluation
//           and clears done, result7 and result1 at the next edge.
//   latency done is high after the 117th rising edge with enable high,
//           counting the edge that starts the evaluation:
//           3 + 6*(2*W+4) + 6 with W = 7 (each MAC term takes 2*W+3 cycles
//           of request plus one gap cycle).
// Lint reports rst_n as used both asynchronously and synchronously: the
// synchronous use is only the disable condition of the assertions below.
module xor_nn
  import xor_nn_pkg::*;
#(
  parameter xor_weights_t WEIGHTS = XOR_WEIGHTS,
  parameter fx_t          THRESH  = FX_HALF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  fx_t  in1,
  input  fx_t  in2,
  output fx_t  result7,
  output logic result1,
  output logic done
);

  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_RUN, S_GAP,
    S_ACT_A, S_CAP_A, S_ACT_B, S_CAP_B, S_ACT_O, S_CAP_O
  } state_t;

  state_t      state;
  logic        layer2;     // 0: hidden layer, 1: output neuron
  logic [1:0]  term;       // 0: bias, 1: first input, 2: second input
  fx_t         in1_q, in2_q;
  fx_t         h1, h2;     // hidden neuron outputs

  // Datapath control and operands.
  logic        mac_clear, maca_en, macb_en, act_en;
  fx_t         maca_mr, maca_md, macb_mr, macb_md;
  logic        maca_done, macb_done;
  acc_t        maca_result, macb_result;
  acc_t        act_in;
  fx_t         act_out;

  three_ip_mac #(.DATA_W(FX_W), .ACC_W(ACC_W)) u_mac_a (
    .clk, .rst_n, .enable(maca_en), .clear(mac_clear),
    .mr(maca_mr), .md(maca_md), .done(maca_done), .mac_result(maca_result)
  );

  three_ip_mac #(.DATA_W(FX_W), .ACC_W(ACC_W)) u_mac_b (
    .clk, .rst_n, .enable(macb_en), .clear(mac_clear),
    .mr(macb_mr), .md(macb_md), .done(macb_done), .mac_result(macb_result)
  );

  activation_function #(.IN_W(ACC_W), .OUT_W(FX_W), .ONE(int'(FX_ONE))) u_act (
    .clk, .rst_n, .enable(act_en), .din(act_in), .dout(act_out)
  );

  // Operand selection: the neuron input and weight for the current term.
  always_comb begin
    unique case (term)
      2'd0: begin
        maca_mr = layer2 ? WEIGHTS.b3  : WEIGHTS.b1;
        maca_md = layer2 ? WEIGHTS.w30 : WEIGHTS.w10;
        macb_mr = WEIGHTS.b2;
        macb_md = WEIGHTS.w20;
      end
      2'd1: begin
        maca_mr = layer2 ? h1          : in1_q;
        maca_md = layer2 ? WEIGHTS.w31 : WEIGHTS.w11;
        macb_mr = in1_q;
        macb_md = WEIGHTS.w21;
      end
      default: begin
        maca_mr = layer2 ? h2          : in2_q;
        maca_md = layer2 ? WEIGHTS.w32 : WEIGHTS.w12;
        macb_mr = in2_q;
        macb_md = WEIGHTS.w22;
      end
    endcase
  end

  assign mac_clear = (state == S_CLR);
  assign maca_en   = (state == S_RUN);
  assign macb_en   = (state == S_RUN) && !layer2;
  assign act_en    = (state == S_ACT_A) || (state == S_ACT_B) || (state == S_ACT_O);
  assign act_in    = (state == S_ACT_B) ? macb_result : maca_result;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      layer2  <= 1'b0;
      term    <= '0;
      in1_q   <= '0;
      in2_q   <= '0;
      h1      <= '0;
      h2      <= '0;
      result7 <= '0;
      result1 <= 1'b0;
      done    <= 1'b0;
    end else if (!enable) begin
      state   <= S_IDLE;
      result7 <= '0;
      result1 <= 1'b0;
      done    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (!done) begin
          in1_q  <= in1;
          in2_q  <= in2;
          layer2 <= 1'b0;
          term   <= '0;
          state  <= S_CLR;
        end
        S_CLR: state <= S_RUN;
        S_RUN: if (maca_done && (layer2 || macb_done)) state <= S_GAP;
        S_GAP: begin
          if (term == 2'd2) begin
            term  <= '0;
            state <= layer2 ? S_ACT_O : S_ACT_A;
          end else begin
            term  <= term + 2'd1;
            state <= S_RUN;
          end
        end
        S_ACT_A: state <= S_CAP_A;
        S_CAP_A: begin
          h1    <= act_out;
          state <= S_ACT_B;
        end
        S_ACT_B: state <= S_CAP_B;
        S_CAP_B: begin
          h2     <= act_out;
          layer2 <= 1'b1;
          state  <= S_CLR;
        end
        S_ACT_O: state <= S_CAP_O;
        S_CAP_O: begin
          result7 <= act_out;
          result1 <= (act_out >= THRESH);
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The hard limiter only ever produces 0 or 1.0, and the decision bit must
  // agree with the held result.
  a_act_levels: assert property (@(posedge clk) disable iff (!rst_n)
    (act_out == FX_ZERO) || (act_out == FX_ONE));
  a_result1: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (result1 == (result7 >= THRESH)));

endmodule
