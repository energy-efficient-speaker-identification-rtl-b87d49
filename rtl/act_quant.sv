// act_quant: output stage of a processing unit, rectification then quantization.
//
// The rectifier is the comparator and mux the document adds after the
// accumulator (ReLU: negative values become 0). The quantizer serves models
// with quantized activations: it clips the value to the [0, 1] range of the
// clipped ReLU and truncates it to qbits fraction bits (a shift right and back,
// so the result stays in Q4.28). With quant_en low the value passes unclipped.
// qbits >= FRAC keeps every bit. Purely combinational.
module act_quant
  import sid_pkg::*;
(
  input  logic [DATA_W-1:0] x,
  input  logic              relu_en,
  input  logic              quant_en,
  input  logic [4:0]        qbits,
  output logic [DATA_W-1:0] y
);
  logic [DATA_W-1:0] r;
  logic [DATA_W-1:0] mask;

  always_comb begin
    r = (relu_en && x[DATA_W-1]) ? '0 : x;
    // low FRAC-qbits bits are dropped by the truncation
    mask = (int'(qbits) >= FRAC) ? '1 : ('1 << (FRAC - int'(qbits)));
    if (quant_en) begin
      if (r[DATA_W-1])            r = '0;    // clip below 0
      else if ($signed(r) > $signed(ONE)) r = ONE; // clip above 1.0
      r = r & mask;
    end
    y = r;
  end
endmodule
