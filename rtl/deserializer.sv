// deserializer: turns 72-bit BRAM words back into the vectors the PU array eats.
//
// The controller tags every read it sends to this unit (rd_tag_t), and the
// word arrives one cycle later with rvalid. RD_X words hold two inputs; the
// unit keeps the latest one. RD_W words hold 72/W_BITS weights of one column;
// word idx fills column lanes idx*WPW onwards, and the word tagged last
// completes the column, which then leaves on col_valid together with x_i (the
// low or high half of the held x word, chosen by the tag's xhalf bit). RD_B
// words hold two 32-bit biases; the word tagged last completes the bias vector
// and raises col_valid with col_is_bias set. Both outputs are registered: the
// token appears the cycle after its last word. Lanes beyond the words read
// keep stale values; they belong to PUs whose results are never written back.
//
// With ZERO_SKIP set (the ternary build), a column whose words were all zero
// is dropped instead of sent, so no PU switches for it; skipped counts them.
// The document checks loaded weights for zero in the deserializer; dropping
// whole columns is how this design applies that to a column-broadcast array.
module deserializer
  import sid_pkg::*;
#(
  parameter int N         = 256,
  parameter int W_BITS    = 8,
  parameter bit ZERO_SKIP = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rvalid,
  input  logic [MEM_W-1:0]    rdata,
  input  rd_tag_t             rtag,
  output logic                col_valid,
  output logic                col_is_bias,
  output logic [DATA_W-1:0]   col_x,
  output logic [N*W_BITS-1:0] col_w,
  output logic [N*DATA_W-1:0] bias_vec,
  output logic [31:0]         skipped
);
  localparam int WPW   = MEM_W / W_BITS;        // weights per word
  localparam int NWW   = (N + WPW - 1) / WPW;   // words per full column
  localparam int NBW   = (N + 1) / 2;           // words per bias vector
  localparam int CBW   = NWW * WPW * W_BITS;    // column buffer width
  localparam int BBW   = NBW * 2 * DATA_W;      // bias buffer width

  logic [CBW-1:0]        colbuf;
  logic [BBW-1:0]        biasbuf;
  logic [2*DATA_W-1:0]   xword;
  logic                  colzero;               // all words so far were zero
  logic                  wzero;

  assign wzero    = (rdata[WPW*W_BITS-1:0] == '0);
  assign col_w    = colbuf[N*W_BITS-1:0];
  assign bias_vec = biasbuf[N*DATA_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col_valid   <= 1'b0;
      col_is_bias <= 1'b0;
      colzero     <= 1'b1;
      skipped     <= '0;
      xword       <= '0;
      col_x       <= '0;
      colbuf      <= '0;
      biasbuf     <= '0;
    end else begin
      col_valid <= 1'b0;
      if (rvalid) begin
        unique case (rtag.kind)
          RD_X: xword <= rdata[2*DATA_W-1:0];
          RD_W: begin
            for (int k = 0; k < NWW; k++)
              if (int'(rtag.idx) == k) colbuf[k*WPW*W_BITS +: WPW*W_BITS] <= rdata[WPW*W_BITS-1:0];
            colzero <= (rtag.idx == '0) ? wzero : (colzero & wzero);
            if (rtag.last) begin
              col_x       <= rtag.xhalf ? xword[2*DATA_W-1:DATA_W] : xword[DATA_W-1:0];
              col_is_bias <= 1'b0;
              if (ZERO_SKIP && wzero && (rtag.idx == '0 || colzero))
                skipped   <= skipped + 1;
              else
                col_valid <= 1'b1;
            end
          end
          RD_B: begin
            for (int k = 0; k < NBW; k++)
              if (int'(rtag.idx) == k) biasbuf[k*2*DATA_W +: 2*DATA_W] <= rdata[2*DATA_W-1:0];
            if (rtag.last) begin
              col_valid   <= 1'b1;
              col_is_bias <= 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
