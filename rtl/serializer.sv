// serializer: writes one tile of PU outputs back to BRAM.
//
// On start the N outputs of the array (res) are captured, so the array is free
// again at once, together with the number of valid outputs (count), the
// destination word address (base) and the layer's output mode. The values then
// leave two per 72-bit word (element 2k low, 2k+1 high, top 8 bits zero) at
// base, base+1, ... A missing odd partner is written as 0.
//
// Fixed-point build (TERNARY = 0): the PUs already rectified and quantized, so
// one word is written per cycle: ceil(count/2) cycles.
// Ternary build: each value first passes through the single layer-scale
// multiplier (tern_scaler), one value per cycle, so one word every two cycles.
// done pulses together with the last write. The serial write-back and the
// single multiplier are the document's; the packing is this design's.
module serializer
  import sid_pkg::*;
#(
  parameter int N       = 256,
  parameter bit TERNARY = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [DIM_W-1:0]    count,
  input  logic [ADDR_W-1:0]   base,
  input  logic [N*DATA_W-1:0] res,
  input  logic [DATA_W-1:0]   scale,
  input  logic                relu_en,
  input  logic                quant_en,
  input  logic [4:0]          qbits,
  output logic                busy,
  output logic                done,
  output logic                we,
  output logic [ADDR_W-1:0]   waddr,
  output logic [MEM_W-1:0]    wdata
);
  logic [N*DATA_W-1:0] sh;           // remaining values, next at the bottom
  logic [DIM_W-1:0]    left;         // values still to emit
  logic [ADDR_W-1:0]   addr;
  logic [DATA_W-1:0]   sc_q;
  logic                relu_q, quant_q;
  logic [4:0]          qbits_q;
  logic                phase;        // ternary: low half already held
  logic [DATA_W-1:0]   lo_q;
  logic [DATA_W-1:0]   scaled;

  tern_scaler u_sc (
    .acc(sh[DATA_W-1:0]), .scale(sc_q), .relu_en(relu_q), .quant_en(quant_q),
    .qbits(qbits_q), .y(scaled));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      we    <= 1'b0;
      left  <= '0;
      phase <= 1'b0;
    end else begin
      done <= 1'b0;
      we   <= 1'b0;
      if (start && !busy) begin
        sh      <= res;
        left    <= count;
        addr    <= base;
        sc_q    <= scale;
        relu_q  <= relu_en;
        quant_q <= quant_en;
        qbits_q <= qbits;
        phase   <= 1'b0;
        busy    <= (count != 0);
        done    <= (count == 0);
      end else if (busy) begin
        if (!TERNARY) begin
          we    <= 1'b1;
          waddr <= addr;
          wdata <= {8'h00, (left >= 2) ? sh[2*DATA_W-1:DATA_W] : '0, sh[DATA_W-1:0]};
          addr  <= addr + 1'b1;
          sh    <= sh >> (2*DATA_W);
          if (left <= 2) begin
            left <= '0;
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            left <= left - 2;
          end
        end else begin
          sh   <= sh >> DATA_W;
          left <= left - 1'b1;
          if (!phase && left != 1) begin
            lo_q  <= scaled;
            phase <= 1'b1;
          end else begin
            we    <= 1'b1;
            waddr <= addr;
            wdata <= phase ? {8'h00, scaled, lo_q} : {8'h00, 32'h0, scaled};
            addr  <= addr + 1'b1;
            phase <= 1'b0;
            if (left == 1) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
