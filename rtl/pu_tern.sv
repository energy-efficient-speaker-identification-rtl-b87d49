// pu_tern: processing unit of the ternary accelerator.
//
// Ternary weights are +Wp, 0 or -Wp for a whole layer, so the PU holds no
// multiplier: with en high it adds the broadcast activation for code TW_POS,
// subtracts it for TW_NEG and leaves the accumulator untouched for a zero
// weight (the register is not even enabled, so a zero weight costs no
// switching). The bias enters as one more input already divided by Wp
// (bias_add high adds it). The multiplication by Wp, the ReLU and the
// quantization happen later, in the serializer. clear zeroes the accumulator.
// acc is the registered accumulation. Code 2'b10 is treated as zero, a choice
// of this design.
module pu_tern
  import sid_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              en,
  input  logic [DATA_W-1:0] x,
  input  logic [1:0]        w,
  input  logic              bias_add,
  input  logic [DATA_W-1:0] bias,
  output logic [DATA_W-1:0] acc
);
  always_ff @(posedge clk) begin
    if (!rst_n || clear)               acc <= '0;
    else if (bias_add)                 acc <= acc + bias;
    else if (en && w == TW_POS)        acc <= acc + x;
    else if (en && w == TW_NEG)        acc <= acc - x;
  end
endmodule
