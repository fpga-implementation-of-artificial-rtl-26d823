// xor_nn_pkg: number format and network constants shared by the XOR
// perceptron datapath.
//
// Signals between neurons are 7-bit two's-complement fixed point with four
// fraction bits (Q3.4): 16 stands for 1.0, 8 for 0.5, -24 for -1.5. A product
// of two such values is Q6.8 and is carried in 14 bits, which is also the
// width of the multiply-accumulate result. The weight set below is the trained
// 2-2-1 network for XOR: hidden neuron A behaves as AND of the inputs, hidden
// neuron B as OR, and the output neuron computes OR and not AND. The values are
// the published ones; the packed-struct layout is this design's own.
package xor_nn_pkg;

  localparam int unsigned FX_W   = 7;   // neuron signal width
  localparam int unsigned FX_FRAC = 4;  // fraction bits
  localparam int unsigned ACC_W  = 14;  // product / weighted-sum width

  typedef logic signed [FX_W-1:0]  fx_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  localparam fx_t FX_ONE  = fx_t'(1 << FX_FRAC);        // 1.0 = 16
  localparam fx_t FX_HALF = fx_t'(1 << (FX_FRAC - 1)); // 0.5 = 8
  localparam fx_t FX_ZERO = fx_t'(0);

  // Bias inputs (b*) and weights (w<neuron><input>, input 0 = bias).
  typedef struct packed {
    fx_t b1;  fx_t w10; fx_t w11; fx_t w12;   // hidden neuron A
    fx_t b2;  fx_t w20; fx_t w21; fx_t w22;   // hidden neuron B
    fx_t b3;  fx_t w30; fx_t w31; fx_t w32;   // output neuron
  } xor_weights_t;

  localparam xor_weights_t XOR_WEIGHTS = '{
    b1: fx_t'(16), w10: fx_t'(-24), w11: fx_t'(16),  w12: fx_t'(16),
    b2: fx_t'(16), w20: fx_t'(-8),  w21: fx_t'(16),  w22: fx_t'(16),
    b3: fx_t'(16), w30: fx_t'(-8),  w31: fx_t'(-32), w32: fx_t'(16)
  };

endpackage
