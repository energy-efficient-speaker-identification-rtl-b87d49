// pu_fxp: processing unit of the fixed-point accelerator.
//
// Each cycle with en high the PU multiplies its W_BITS-bit weight by the
// broadcast 32-bit activation and adds the product to a 32-bit accumulation
// register. The weight has W_BITS-1 fraction bits, so the product is shifted
// right by that amount to stay in Q4.28. On the bias step (bias_add high) the
// 32-bit bias is added instead. The output y is the accumulator passed through
// the rectification and quantization stage (act_quant), valid as soon as the
// last accumulation has been clocked in. clear zeroes the accumulator and has
// priority. Arithmetic wraps on overflow, like a plain 32-bit adder.
// The multiply/accumulate/bias/ReLU/quantize structure follows the document;
// the weight scaling and wrap-around are this design's choices.
module pu_fxp
  import sid_pkg::*;
#(
  parameter int W_BITS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              en,
  input  logic [DATA_W-1:0] x,
  input  logic [W_BITS-1:0] w,
  input  logic              bias_add,
  input  logic [DATA_W-1:0] bias,
  input  logic              relu_en,
  input  logic              quant_en,
  input  logic [4:0]        qbits,
  output logic [DATA_W-1:0] acc,
  output logic [DATA_W-1:0] y
);
  logic signed [DATA_W+W_BITS-1:0] prod;

  assign prod = $signed(x) * $signed(w);

  always_ff @(posedge clk) begin
    if (!rst_n || clear)  acc <= '0;
    else if (bias_add)    acc <= acc + bias;
    else if (en)          acc <= acc + DATA_W'(prod >>> (W_BITS - 1));
  end

  act_quant u_aq (.x(acc), .relu_en(relu_en), .quant_en(quant_en), .qbits(qbits), .y(y));
endmodule
