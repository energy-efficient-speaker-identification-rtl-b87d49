// tern_scaler: the ternary accelerator's addition to the serializer.
//
// Because every nonzero ternary weight of a layer is +Wp or -Wp, the PUs only
// add and subtract; this unit applies the layer constant afterwards, one value
// per cycle through a single multiplier, as the document describes: y =
// act_quant((acc * Wp) >> 28). The product keeps its low 32 bits after the
// shift (wraps, like the PU adders). Rectifying after the multiply is valid
// because Wp is positive. Purely combinational; the serializer registers it.
module tern_scaler
  import sid_pkg::*;
(
  input  logic [DATA_W-1:0] acc,
  input  logic [DATA_W-1:0] scale,
  input  logic              relu_en,
  input  logic              quant_en,
  input  logic [4:0]        qbits,
  output logic [DATA_W-1:0] y
);
  logic signed [2*DATA_W-1:0] prod;
  logic [DATA_W-1:0]          scaled;

  assign prod   = $signed(acc) * $signed(scale);
  assign scaled = DATA_W'(prod >>> FRAC);

  act_quant u_aq (.x(scaled), .relu_en(relu_en), .quant_en(quant_en), .qbits(qbits), .y(y));
endmodule
