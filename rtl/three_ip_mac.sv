// three_ip_mac: sequential signed multiply-accumulate unit.
//
// One request multiplies the two's-complement operands mr (multiplier) and md
// (multiplicand) and adds the product into an accumulator. The multiplier is
// the classic shift-and-add scheme for signed numbers: a register P of
// 2*DATA_W+1 bits holds the partial product in its upper DATA_W+1 bits and the
// not-yet-used multiplier bits in its lower DATA_W bits. For each multiplier
// bit there is an ADD_SUB cycle (add the sign-extended md to the upper part if
// the current bit is 1; subtract instead for the last bit, whose weight is
// negative) and a SHIFT cycle (arithmetic shift right of P by one). After
// DATA_W bits, P[2*DATA_W-1:0] is the exact product, which an ACCUM cycle adds
// into the accumulator. This state sequence follows the published design; the
// handshake details below are this design's own.
//
// Interface and timing:
//   enable  level request. At the first rising edge with enable high the
//           operands are captured; after the (2*DATA_W+2)-th rising edge
//           with enable high (16 for DATA_W = 7, counting the capture edge)
//           done is high and mac_result shows the new sum. done stays high
//           until enable is dropped. With enable low the unit returns to IDLE at the next
//           edge; a new request needs enable low for at least one cycle.
//   clear   synchronous clear of the accumulator (has priority over ACCUM).
//   rst_n   asynchronous reset of all state.
// The accumulator wraps modulo 2^ACC_W on overflow, as plain two's-complement
// addition does; no saturation is applied.
module three_ip_mac #(
  parameter int unsigned DATA_W = 7,
  parameter int unsigned ACC_W  = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic                     clear,
  input  logic signed [DATA_W-1:0] mr,
  input  logic signed [DATA_W-1:0] md,
  output logic                     done,
  output logic signed [ACC_W-1:0]  mac_result
);

  localparam int unsigned P_W   = 2*DATA_W + 1;
  localparam int unsigned CNT_W = $clog2(DATA_W) + 1;

  typedef enum logic [2:0] {S_IDLE, S_ADD_SUB, S_SHIFT, S_ACCUM, S_DONE} state_t;

  state_t                   state;
  logic [P_W-1:0]           p;        // {partial product, multiplier bits}
  logic signed [DATA_W:0]   md_ext;   // sign-extended multiplicand
  logic [CNT_W-1:0]         count;    // index of the multiplier bit in use
  logic signed [ACC_W-1:0]  acc;
  logic signed [2*DATA_W-1:0] product;

  assign product    = signed'(p[2*DATA_W-1:0]);
  assign mac_result = acc;
  assign done       = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      p      <= '0;
      md_ext <= '0;
      count  <= '0;
    end else if (!enable) begin
      state <= S_IDLE;
      count <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          p      <= {{(DATA_W+1){1'b0}}, mr};
          md_ext <= {md[DATA_W-1], md};
          count  <= '0;
          state  <= S_ADD_SUB;
        end
        S_ADD_SUB: begin
          if (p[0]) begin
            if (count == CNT_W'(DATA_W-1))
              p[P_W-1:DATA_W] <= p[P_W-1:DATA_W] - md_ext;
            else
              p[P_W-1:DATA_W] <= p[P_W-1:DATA_W] + md_ext;
          end
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          p <= {p[P_W-1], p[P_W-1:1]};
          if (count == CNT_W'(DATA_W-1)) begin
            state <= S_ACCUM;
          end else begin
            count <= count + 1'b1;
            state <= S_ADD_SUB;
          end
        end
        S_ACCUM: state <= S_DONE;
        S_DONE:  state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Accumulator: cleared on request, loaded once per product.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      acc <= '0;
    else if (clear)
      acc <= '0;
    else if (enable && state == S_ACCUM)
      acc <= acc + ACC_W'(product);
  end

  // Handshake rule: once done, the unit holds done (and adds nothing more)
  // for as long as the request stays high.
  a_done_held: assert property (@(posedge clk) disable iff (!rst_n)
    (done && enable) |=> done);

endmodule
