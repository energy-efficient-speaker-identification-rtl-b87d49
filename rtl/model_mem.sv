// model_mem: the accelerator's whole on-chip store, N_BRAM block RAMs of
// 512 x 72 bits seen as one word-addressed memory.
//
// The document uses all 140 blocks of the XC7Z020 for model weights and biases,
// the input feature segment and the intermediate activations. The upper
// address bits pick a block, the low 9 bits the word inside it. Writes and
// reads to addresses beyond the last block are dropped (reads return 0).
// Timing: one write port, one read port, read data one cycle after re.
module model_mem
  import sid_pkg::*;
#(
  parameter int N_BLK = N_BRAM,
  parameter int DEPTH = BRAM_DEPTH,
  parameter int WIDTH = MEM_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);
  localparam int RW = $clog2(DEPTH);
  localparam int BW = ADDR_W - RW;

  logic [WIDTH-1:0] blk_rdata [N_BLK];
  logic [BW-1:0]    rblk_q;
  logic             rvalid_blk_q;

  for (genvar b = 0; b < N_BLK; b++) begin : g_blk
    bram_sdp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_bram (
      .clk  (clk),
      .we   (we && (waddr[ADDR_W-1:RW] == BW'(b))),
      .waddr(waddr[RW-1:0]),
      .wdata(wdata),
      .re   (re && (raddr[ADDR_W-1:RW] == BW'(b))),
      .raddr(raddr[RW-1:0]),
      .rdata(blk_rdata[b])
    );
  end

  // Output mux: remember which block was read.
  always_ff @(posedge clk) begin
    if (re) begin
      rblk_q       <= raddr[ADDR_W-1:RW];
      rvalid_blk_q <= (int'(raddr[ADDR_W-1:RW]) < N_BLK);
    end
  end

  always_comb begin
    rdata = '0;
    for (int b = 0; b < N_BLK; b++)
      if (rvalid_blk_q && rblk_q == BW'(b)) rdata = blk_rdata[b];
  end
endmodule
