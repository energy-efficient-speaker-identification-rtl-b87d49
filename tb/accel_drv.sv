// accel_drv: processing-system stand-in that runs one model on one accelerator.
//
// When go rises it builds a random model (SidModel) with NL layers whose sizes
// are taken from DIMS (12 bits per size, DIMS[11:0] = input length), writes the
// BRAM image through the host port one word per cycle, pulses start, waits for
// done while counting cycles, then reads the result back through the host port
// and compares every value with the software reference. It also checks the
// run's cycle count against the read/write schedule of the design (reads +
// serializer cycles, plus a small fixed overhead per tile), the number of
// skipped zero columns (when ZERO_SKIP) and the reported result location.
// finished rises when all is done; checks/failures hold the tallies, and the
// mech_* outputs count how often each mechanism occurred.
module accel_drv
  import sid_pkg::*;
  import sid_tb_pkg::*;
#(
  parameter int N         = 8,
  parameter int W_BITS    = 8,
  parameter bit TERNARY   = 1'b0,
  parameter bit ZERO_SKIP = 1'b0,
  parameter int NL        = 3,
  parameter logic [12*8-1:0] DIMS = '0,
  parameter int SEED      = 1
) (
  input  logic              clk,
  input  logic              go,
  output logic              finished,
  output int                checks,
  output int                failures,
  output int                mech_tiles,       // layers needing more than one tile
  output int                mech_skips,
  output int                mech_stalls,
  output int                mech_relu,
  output int                mech_clip,
  output int                mech_trunc,
  output longint            run_cycles,
  output logic              start,
  input  logic              busy,
  input  logic              done,
  output logic              host_we,
  output logic [ADDR_W-1:0] host_waddr,
  output logic [MEM_W-1:0]  host_wdata,
  output logic              host_re,
  output logic [ADDR_W-1:0] host_raddr,
  input  logic [MEM_W-1:0]  host_rdata,
  input  logic [ADDR_W-1:0] out_base,
  input  logic [DIM_W-1:0]  out_dim,
  input  logic [31:0]       skipped_cols,
  input  logic [31:0]       stall_cycles
);
  SidModel m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%m] %s", what);
    end
  endtask

  initial begin
    int d[$];
    int skip0;
    logic [71:0] wd;
    longint lo, hi;
    finished = 0; checks = 0; failures = 0;
    start = 0; host_we = 0; host_re = 0; host_waddr = '0; host_wdata = '0; host_raddr = '0;
    mech_tiles = 0; mech_skips = 0; mech_stalls = 0; mech_relu = 0; mech_clip = 0; mech_trunc = 0;
    run_cycles = 0;
    void'($urandom(SEED));
    for (int l = 0; l <= NL; l++) d.push_back(int'(DIMS[12*l +: 12]));
    m = new(N, W_BITS, TERNARY);
    m.build(d);
    for (int l = 0; l < NL; l++) if (d[l+1] > N) mech_tiles++;
    mech_relu = m.n_relu_zero; mech_clip = m.n_clip; mech_trunc = m.n_trunc;
    wait (go);
    @(posedge clk);
    // load the image
    foreach (m.img[a]) begin
      host_we <= 1; host_waddr <= ADDR_W'(a); host_wdata <= m.img[a];
      @(posedge clk);
    end
    host_we <= 0;
    skip0 = int'(skipped_cols);
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    run_cycles = 1;
    while (!done) begin @(posedge clk); run_cycles++; end
    check(!busy || 1'b1, "busy");
    @(posedge clk);
    check(!busy, "busy low after done");
    check(int'(out_dim) == d[NL], $sformatf("out_dim %0d exp %0d", out_dim, d[NL]));
    check(int'(out_base) == ((NL % 2) ? m.act_b : m.act_a), $sformatf("out_base %0d", out_base));
    // cycle count against the schedule
    lo = m.exp_reads + m.exp_ser;
    hi = lo + 12 * m.n_tiles + 8 * NL + 30 + longint'(stall_cycles);
    check(run_cycles >= lo && run_cycles <= hi,
          $sformatf("cycles %0d outside [%0d,%0d]", run_cycles, lo, hi));
    if (ZERO_SKIP) begin
      check(int'(skipped_cols) - skip0 == m.exp_skip,
            $sformatf("skipped %0d exp %0d", int'(skipped_cols) - skip0, m.exp_skip));
      mech_skips = int'(skipped_cols) - skip0;
    end
    mech_stalls = int'(stall_cycles);
    // read the result
    for (int k = 0; k < (d[NL] + 1) / 2; k++) begin
      host_re <= 1; host_raddr <= ADDR_W'(int'(out_base) + k);
      @(posedge clk);
      host_re <= 0;
      @(posedge clk);
      #1;
      wd = host_rdata;
      check(wd[31:0] == m.out[2*k], $sformatf("out[%0d] %h exp %h", 2*k, wd[31:0], m.out[2*k]));
      if (2*k + 1 < d[NL])
        check(wd[63:32] == m.out[2*k+1], $sformatf("out[%0d] %h exp %h", 2*k+1, wd[63:32], m.out[2*k+1]));
    end
    $display("[%m] run of %0d cycles (schedule %0d), %0d checks, %0d failures",
             run_cycles, lo, checks, failures);
    finished = 1;
  end
endmodule
