// pu_array: the linear array of N processing units.
//
// Every cycle with col_valid high one column of the layer's weight matrix
// enters: PU j receives weight j of the column and all PUs receive the same
// input value x_i, so after in_dim columns PU j holds the dot product of row j
// with x. bias_add adds bias j to PU j (bias_vec element j in bits
// [32j +: 32]). clear zeroes all PUs. res holds the N outputs: rectified and
// quantized in the fixed-point build (TERNARY = 0), the raw accumulation in the
// ternary build, whose scaling happens in the serializer. The linear,
// column-broadcast organisation is the document's.
module pu_array
  import sid_pkg::*;
#(
  parameter int N       = 256,
  parameter int W_BITS  = 8,
  parameter bit TERNARY = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  col_valid,
  input  logic [DATA_W-1:0]     x,
  input  logic [N*W_BITS-1:0]   w_col,
  input  logic                  bias_add,
  input  logic [N*DATA_W-1:0]   bias_vec,
  input  logic                  relu_en,
  input  logic                  quant_en,
  input  logic [4:0]            qbits,
  output logic [N*DATA_W-1:0]   res
);
  for (genvar j = 0; j < N; j++) begin : g_pu
    if (TERNARY) begin : g_t
      pu_tern u_pu (
        .clk(clk), .rst_n(rst_n), .clear(clear), .en(col_valid), .x(x),
        .w(w_col[j*W_BITS +: 2]), .bias_add(bias_add),
        .bias(bias_vec[j*DATA_W +: DATA_W]), .acc(res[j*DATA_W +: DATA_W]));
    end else begin : g_f
      logic [DATA_W-1:0] acc_unused;
      pu_fxp #(.W_BITS(W_BITS)) u_pu (
        .clk(clk), .rst_n(rst_n), .clear(clear), .en(col_valid), .x(x),
        .w(w_col[j*W_BITS +: W_BITS]), .bias_add(bias_add),
        .bias(bias_vec[j*DATA_W +: DATA_W]), .relu_en(relu_en),
        .quant_en(quant_en), .qbits(qbits), .acc(acc_unused),
        .y(res[j*DATA_W +: DATA_W]));
    end
  end
endmodule
