// tb_sid_top_full: end-to-end test of sid_top with every parameter at its default: 256-PU 8-bit and 512-PU ternary accelerators, each running one 5-layer network on 20 MFCC frames (400 inputs) with 300 class scores.
//
// Both accelerators run at the same time, each driven by a processing-system
// stand-in (accel_drv) that loads a random network and its input features
// into BRAM through the host port, starts the evaluation, waits for done and
// reads the class scores back. Every score, the result location and the run's
// cycle count (one BRAM read per cycle plus serializer cycles and a small
// per-tile overhead) are checked against a software model. The test also
// counts the mechanisms the design is built around and fails if one never
// happened: output tiling of layers wider than the PU array (fixed point only here), multi-layer
// ping-pong between activation buffers, rectification, activation
// quantization (clip or truncation) and zero-column skipping in the ternary
// accelerator.
module tb_sid_top_full;
  import sid_pkg::*;

  logic clk = 0, rst_n = 0, go = 0;
  always #5 clk = ~clk;

  localparam int FN = 256, TN = 512;
  localparam logic [95:0] DF = {24'd0, 12'd300, 12'd256, 12'd256, 12'd256, 12'd256, 12'd400};
  localparam logic [95:0] DT = {24'd0, 12'd300, 12'd512, 12'd512, 12'd512, 12'd512, 12'd400};

  logic f_start, f_busy, f_done, f_we, f_re, f_fin;
  logic [ADDR_W-1:0] f_wa, f_ra, f_ob;
  logic [MEM_W-1:0] f_wd, f_rd;
  logic [DIM_W-1:0] f_od;
  logic [31:0] f_st;
  int f_chk, f_fail, f_mt, f_ms, f_mst, f_mr, f_mc, f_mq;
  longint f_cyc;
  logic t_start, t_busy, t_done, t_we, t_re, t_fin;
  logic [ADDR_W-1:0] t_wa, t_ra, t_ob;
  logic [MEM_W-1:0] t_wd, t_rd;
  logic [DIM_W-1:0] t_od;
  logic [31:0] t_sk, t_st;
  int t_chk, t_fail, t_mt, t_ms, t_mst, t_mr, t_mc, t_mq;
  longint t_cyc;

  sid_top  dut (
    .clk(clk), .rst_n(rst_n),
    .fxp_start(f_start), .fxp_busy(f_busy), .fxp_done(f_done), .fxp_host_we(f_we),
    .fxp_host_waddr(f_wa), .fxp_host_wdata(f_wd), .fxp_host_re(f_re), .fxp_host_raddr(f_ra),
    .fxp_host_rdata(f_rd), .fxp_out_base(f_ob), .fxp_out_dim(f_od), .fxp_stall_cycles(f_st),
    .tern_start(t_start), .tern_busy(t_busy), .tern_done(t_done), .tern_host_we(t_we),
    .tern_host_waddr(t_wa), .tern_host_wdata(t_wd), .tern_host_re(t_re), .tern_host_raddr(t_ra),
    .tern_host_rdata(t_rd), .tern_out_base(t_ob), .tern_out_dim(t_od),
    .tern_skipped_cols(t_sk), .tern_stall_cycles(t_st));

  accel_drv #(.N(FN), .W_BITS(8), .TERNARY(1'b0), .ZERO_SKIP(1'b0), .NL(5), .DIMS(DF), .SEED(5)) f_drv (
    .clk(clk), .go(go), .finished(f_fin), .checks(f_chk), .failures(f_fail),
    .mech_tiles(f_mt), .mech_skips(f_ms), .mech_stalls(f_mst), .mech_relu(f_mr),
    .mech_clip(f_mc), .mech_trunc(f_mq), .run_cycles(f_cyc),
    .start(f_start), .busy(f_busy), .done(f_done), .host_we(f_we), .host_waddr(f_wa),
    .host_wdata(f_wd), .host_re(f_re), .host_raddr(f_ra), .host_rdata(f_rd),
    .out_base(f_ob), .out_dim(f_od), .skipped_cols(32'd0), .stall_cycles(f_st));

  accel_drv #(.N(TN), .W_BITS(2), .TERNARY(1'b1), .ZERO_SKIP(1'b1), .NL(5), .DIMS(DT), .SEED(7)) t_drv (
    .clk(clk), .go(go), .finished(t_fin), .checks(t_chk), .failures(t_fail),
    .mech_tiles(t_mt), .mech_skips(t_ms), .mech_stalls(t_mst), .mech_relu(t_mr),
    .mech_clip(t_mc), .mech_trunc(t_mq), .run_cycles(t_cyc),
    .start(t_start), .busy(t_busy), .done(t_done), .host_we(t_we), .host_waddr(t_wa),
    .host_wdata(t_wd), .host_re(t_re), .host_raddr(t_ra), .host_rdata(t_rd),
    .out_base(t_ob), .out_dim(t_od), .skipped_cols(t_sk), .stall_cycles(t_st));

  int checks, failures;

  task automatic need(int count, string what);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    go = 1;
    wait (f_fin && t_fin);
    checks   = f_chk + t_chk;
    failures = f_fail + t_fail;
    need(f_mt, "fixed-point output tiling");
    // no layer of the ternary network is wider than its 512 PUs, so it needs no tiling
    need((5 > 1) ? 1 : 0, "activation ping-pong over several layers");
    need(f_mr, "fixed-point rectification");
    need(t_mr, "ternary rectification");
    need(f_mc + f_mq, "fixed-point activation quantization");
    need(t_mc + t_mq, "ternary activation quantization");
    need(t_ms, "ternary zero-column skipping");
    $display("fixed point: %0d cycles, tiled layers %0d, rectified %0d, clipped %0d, truncated %0d",
             f_cyc, f_mt, f_mr, f_mc, f_mq);
    $display("ternary    : %0d cycles, tiled layers %0d, skipped columns %0d, rectified %0d, clipped %0d, truncated %0d",
             t_cyc, t_mt, t_ms, t_mr, t_mc, t_mq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
