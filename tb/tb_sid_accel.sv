// tb_sid_accel: end-to-end test of the accelerator block in both builds.
//
// A fixed-point instance (20 PUs, 8-bit weights) and a ternary instance (40
// PUs, zero skipping on) each run a random 4-layer network whose layers are
// wider than the array, so outputs are split into tiles, columns take several
// BRAM words and layers alternate between the two activation buffers. The
// memory is cut to 16 blocks to keep the run short. Results, result location,
// cycle count and skipped columns are checked against a software model.
module tb_sid_accel;
  import sid_pkg::*;

  logic clk = 0, rst_n = 0, go = 0;
  always #5 clk = ~clk;

  localparam logic [95:0] DF = {36'd0, 12'd9, 12'd25, 12'd30, 12'd22, 12'd13};
  localparam logic [95:0] DT = {36'd0, 12'd11, 12'd50, 12'd45, 12'd83, 12'd37};

  `define ACCEL_INST(P, NN, WB, TER, ZS, DD, SD) \
  logic P``_start, P``_busy, P``_done, P``_we, P``_re, P``_fin; \
  logic [ADDR_W-1:0] P``_wa, P``_ra, P``_ob; logic [MEM_W-1:0] P``_wd, P``_rd; \
  logic [DIM_W-1:0] P``_od; logic [31:0] P``_sk, P``_st; \
  int P``_chk, P``_fail, P``_mt, P``_ms, P``_mst, P``_mr, P``_mc, P``_mq; longint P``_cyc; \
  sid_accel #(.N(NN), .W_BITS(WB), .TERNARY(TER), .ZERO_SKIP(ZS), .N_BLK(16)) P``_dut ( \
    .clk(clk), .rst_n(rst_n), .start(P``_start), .busy(P``_busy), .done(P``_done), \
    .host_we(P``_we), .host_waddr(P``_wa), .host_wdata(P``_wd), .host_re(P``_re), \
    .host_raddr(P``_ra), .host_rdata(P``_rd), .out_base(P``_ob), .out_dim(P``_od), \
    .skipped_cols(P``_sk), .stall_cycles(P``_st)); \
  accel_drv #(.N(NN), .W_BITS(WB), .TERNARY(TER), .ZERO_SKIP(ZS), .NL(4), .DIMS(DD), .SEED(SD)) P``_drv ( \
    .clk(clk), .go(go), .finished(P``_fin), .checks(P``_chk), .failures(P``_fail), \
    .mech_tiles(P``_mt), .mech_skips(P``_ms), .mech_stalls(P``_mst), .mech_relu(P``_mr), \
    .mech_clip(P``_mc), .mech_trunc(P``_mq), .run_cycles(P``_cyc), \
    .start(P``_start), .busy(P``_busy), .done(P``_done), .host_we(P``_we), .host_waddr(P``_wa), \
    .host_wdata(P``_wd), .host_re(P``_re), .host_raddr(P``_ra), .host_rdata(P``_rd), \
    .out_base(P``_ob), .out_dim(P``_od), .skipped_cols(P``_sk), .stall_cycles(P``_st));

  `ACCEL_INST(f, 20, 8, 1'b0, 1'b0, DF, 11)
  `ACCEL_INST(t, 40, 2, 1'b1, 1'b1, DT, 23)

  int checks, failures;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    go = 1;
    wait (f_fin && t_fin);
    checks   = f_chk + t_chk;
    failures = f_fail + t_fail;
    // every mechanism must have been exercised
    checks += 4;
    if (f_mt == 0 || t_mt == 0) begin failures++; $display("FAIL no tiled layer"); end
    if (t_ms == 0)              begin failures++; $display("FAIL no skipped column"); end
    if (f_mr == 0 || t_mr == 0) begin failures++; $display("FAIL no rectified value"); end
    if (f_mc + f_mq == 0 || t_mc + t_mq == 0) begin failures++; $display("FAIL no quantization"); end
    $display("fxp: tiles %0d relu %0d clip %0d trunc %0d; tern: tiles %0d skips %0d relu %0d clip %0d trunc %0d",
             f_mt, f_mr, f_mc, f_mq, t_mt, t_ms, t_mr, t_mc, t_mq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
