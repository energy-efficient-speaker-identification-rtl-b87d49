// sid_top: programmable-logic side of the speaker-identification system.
//
// The processing system (ARM core) receives audio, extracts 20-dimensional
// MFCC frames, writes 20 frames (400 values) into the accelerator's feature
// buffer and starts an evaluation; the accelerator computes the network's
// class scores into BRAM, and the processing system reads, averages and
// decides. Two accelerators are provided, each a complete build with its own
// 140-block BRAM store and its own processing-system ports:
//   fxp_*  : fixed-point accelerator, FXP_N PUs with FXP_W_BITS-bit weights
//            (default 256 PUs, 8-bit), for the CNN / LCN / small FCN models.
//   tern_* : ternary accelerator, TERN_N PUs (default 512) with 2-bit
//            weights, one serializer multiplier and zero-column skipping, for
//            the ternary large FCN.
// On the FPGA only one of them fits at a time; here they sit side by side.
// Port timing is that of sid_accel.
module sid_top
  import sid_pkg::*;
#(
  parameter int FXP_N      = 256,
  parameter int FXP_W_BITS = 8,
  parameter int TERN_N     = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // fixed-point accelerator
  input  logic              fxp_start,
  output logic              fxp_busy,
  output logic              fxp_done,
  input  logic              fxp_host_we,
  input  logic [ADDR_W-1:0] fxp_host_waddr,
  input  logic [MEM_W-1:0]  fxp_host_wdata,
  input  logic              fxp_host_re,
  input  logic [ADDR_W-1:0] fxp_host_raddr,
  output logic [MEM_W-1:0]  fxp_host_rdata,
  output logic [ADDR_W-1:0] fxp_out_base,
  output logic [DIM_W-1:0]  fxp_out_dim,
  output logic [31:0]       fxp_stall_cycles,
  // ternary accelerator
  input  logic              tern_start,
  output logic              tern_busy,
  output logic              tern_done,
  input  logic              tern_host_we,
  input  logic [ADDR_W-1:0] tern_host_waddr,
  input  logic [MEM_W-1:0]  tern_host_wdata,
  input  logic              tern_host_re,
  input  logic [ADDR_W-1:0] tern_host_raddr,
  output logic [MEM_W-1:0]  tern_host_rdata,
  output logic [ADDR_W-1:0] tern_out_base,
  output logic [DIM_W-1:0]  tern_out_dim,
  output logic [31:0]       tern_skipped_cols,
  output logic [31:0]       tern_stall_cycles
);
  logic [31:0] fxp_skipped_unused;

  sid_accel #(.N(FXP_N), .W_BITS(FXP_W_BITS), .TERNARY(1'b0), .ZERO_SKIP(1'b0)) u_fxp (
    .clk(clk), .rst_n(rst_n), .start(fxp_start), .busy(fxp_busy), .done(fxp_done),
    .host_we(fxp_host_we), .host_waddr(fxp_host_waddr), .host_wdata(fxp_host_wdata),
    .host_re(fxp_host_re), .host_raddr(fxp_host_raddr), .host_rdata(fxp_host_rdata),
    .out_base(fxp_out_base), .out_dim(fxp_out_dim), .skipped_cols(fxp_skipped_unused),
    .stall_cycles(fxp_stall_cycles));

  sid_accel #(.N(TERN_N), .W_BITS(2), .TERNARY(1'b1), .ZERO_SKIP(1'b1)) u_tern (
    .clk(clk), .rst_n(rst_n), .start(tern_start), .busy(tern_busy), .done(tern_done),
    .host_we(tern_host_we), .host_waddr(tern_host_waddr), .host_wdata(tern_host_wdata),
    .host_re(tern_host_re), .host_raddr(tern_host_raddr), .host_rdata(tern_host_rdata),
    .out_base(tern_out_base), .out_dim(tern_out_dim), .skipped_cols(tern_skipped_cols),
    .stall_cycles(tern_stall_cycles));
endmodule
