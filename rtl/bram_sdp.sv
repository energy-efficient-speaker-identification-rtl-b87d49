// bram_sdp: one 36-Kbit block RAM in simple-dual-port mode, 512 words of 72 bits.
//
// One write port and one read port on the same clock, as the document
// configures the 7-series blocks. The read is synchronous: rdata holds the word
// at raddr one cycle after re is high, and keeps its value while re is low.
// A read and a write of the same word in one cycle return the old word
// (read-first); that collision rule and the zero-initialised contents are this
// design's choices.
module bram_sdp #(
  parameter int DEPTH = 512,
  parameter int WIDTH = 72
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
