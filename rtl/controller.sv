// controller: the routing unit's control FSM of one accelerator.
//
// The document's controller is a three-state machine, sleep / initialize /
// run, driven by a start command from the processing system. Here:
//   SLEEP  waits for start; the processing system owns the BRAM meanwhile.
//   INIT   reads the model header (words 0 .. 2*MAX_LAYERS) into registers:
//          the layer count, the two activation buffers and one descriptor plus
//          one scale word per layer (see sid_pkg).
//   RUN    evaluates the layers in order. Layer l reads its input from buffer
//          A when l is even and B when odd, and writes the other one. Each
//          layer is cut into output tiles of at most N rows. For a tile of tw
//          rows it clears the PU array, then for every input i issues the read
//          of the x word (for even i, the word holds x_i and x_i+1) and the
//          ceil(tw/WPW) weight words of column i, then ceil(tw/2) bias words;
//          once the array has taken the bias, it hands the tile to the
//          serializer and waits for it to finish.
// A new column is only started while the FIFO to the array has room
// (fifo_almost_full low); otherwise the controller stalls and pulses stall.
// done pulses when the last layer has been written; out_base/out_dim then
// say where the result is.
//
// Weight layout expected in BRAM (this design's choice, matching the
// document's per-layer weight block and its per-layer read count): for each
// tile, for each input i, the tile's weights of column i packed from a fresh
// word; weight pointer runs on across tiles. Biases: b_base + tile*N/2.
// Read timing: one request per cycle at most, data back one cycle later.
module controller
  import sid_pkg::*;
#(
  parameter int N          = 256,
  parameter int W_BITS     = 8,
  parameter int MAX_LAYERS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output ctrl_state_e       state,
  output logic              busy,
  output logic              done,
  // BRAM read requests
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  output rd_tag_t           rd_tag,
  output logic              rd_deser,     // data goes to the deserializer
  input  logic              hdr_valid,    // header word returned
  input  logic [MEM_W-1:0]  hdr_data,
  // flow control from the array side
  input  logic              fifo_almost_full,
  input  logic              bias_done,
  output logic              stall,
  // PU array / serializer control
  output logic              arr_clear,
  output logic              relu_en,
  output logic              quant_en,
  output logic [4:0]        qbits,
  output logic [DATA_W-1:0] scale,
  output logic              ser_start,
  output logic [DIM_W-1:0]  ser_count,
  output logic [ADDR_W-1:0] ser_base,
  input  logic              ser_done,
  // result location
  output logic [ADDR_W-1:0] out_base,
  output logic [DIM_W-1:0]  out_dim
);
  localparam int WPW       = MEM_W / W_BITS;
  localparam int HDR_WORDS = 1 + 2 * MAX_LAYERS;
  localparam int HW        = $clog2(HDR_WORDS + 1);

  typedef enum logic [2:0] {P_LAYER, P_TILE, P_COL, P_BIAS, P_WAITB, P_SER} phase_e;

  hdr_t                hdr;
  layer_desc_t         desc  [MAX_LAYERS];
  logic [DATA_W-1:0]   scl   [MAX_LAYERS];
  logic [HW-1:0]       rd_cnt, rcv_cnt;
  phase_e              ph;
  logic [7:0]          layer, n_layers;
  layer_desc_t         cur;
  logic [ADDR_W-1:0]   in_base, dst_base, w_ptr;
  logic [DIM_W-1:0]    tile_off, tw, nwc, nbw, i_cnt, k_cnt;
  logic                x_pending;    // x word of this column still to be read

  assign busy     = (state != S_SLEEP);
  assign relu_en  = cur.relu;
  assign quant_en = cur.quant;
  assign qbits    = cur.qbits;
  assign scale    = scl[layer[$clog2(MAX_LAYERS)-1:0]];

  // Every layer of a model must have at least one output.
  a_out_dim : assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RUN && ph == P_TILE) |-> cur.out_dim != 0)
    else $error("controller: layer with zero outputs");

  function automatic logic [DIM_W-1:0] min_n(logic [DIM_W-1:0] a);
    return (int'(a) > N) ? DIM_W'(N) : a;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_SLEEP;
      ph        <= P_LAYER;
      done      <= 1'b0;
      rd_en     <= 1'b0;
      rd_deser  <= 1'b0;
      arr_clear <= 1'b0;
      ser_start <= 1'b0;
      stall     <= 1'b0;
      rd_cnt    <= '0;
      rcv_cnt   <= '0;
      layer     <= '0;
      n_layers  <= '0;
      out_base  <= '0;
      out_dim   <= '0;
      cur       <= '0;
      hdr       <= '0;
    end else begin
      done      <= 1'b0;
      rd_en     <= 1'b0;
      rd_deser  <= 1'b0;
      arr_clear <= 1'b0;
      ser_start <= 1'b0;
      stall     <= 1'b0;

      // header words land here while in INIT
      if (hdr_valid) begin
        rcv_cnt <= rcv_cnt + 1'b1;
        if (rcv_cnt == 0) hdr <= hdr_t'(hdr_data);
        else if (rcv_cnt[0]) desc[(int'(rcv_cnt) - 1) / 2] <= layer_desc_t'(hdr_data);
        else                 scl [(int'(rcv_cnt) - 2) / 2] <= hdr_data[DATA_W-1:0];
      end

      unique case (state)
        S_SLEEP: begin
          if (start) begin
            state   <= S_INIT;
            rd_cnt  <= '0;
            rcv_cnt <= '0;
          end
        end

        S_INIT: begin
          if (rd_cnt < HW'(HDR_WORDS)) begin
            rd_en   <= 1'b1;
            rd_addr <= ADDR_W'(rd_cnt);
            rd_cnt  <= rd_cnt + 1'b1;
          end
          if (hdr_valid && rcv_cnt == HW'(HDR_WORDS - 1)) begin
            state    <= S_RUN;
            ph       <= P_LAYER;
            layer    <= '0;
            in_base  <= hdr.act_a;
            n_layers <= (int'(hdr.n_layers) > MAX_LAYERS) ? 8'(MAX_LAYERS) : hdr.n_layers;
          end
        end

        S_RUN: begin
          unique case (ph)
            P_LAYER: begin
              if (layer >= n_layers) begin
                state    <= S_SLEEP;
                done     <= 1'b1;
                out_base <= in_base;   // last layer's output buffer
                out_dim  <= (layer == 0) ? '0 : cur.out_dim;
              end else begin
                cur      <= desc[layer[$clog2(MAX_LAYERS)-1:0]];
                in_base  <= layer[0] ? hdr.act_b : hdr.act_a;
                dst_base <= layer[0] ? hdr.act_a : hdr.act_b;
                w_ptr    <= desc[layer[$clog2(MAX_LAYERS)-1:0]].w_base;
                tile_off <= '0;
                ph       <= P_TILE;
              end
            end

            P_TILE: begin
              tw        <= min_n(cur.out_dim - tile_off);
              nwc       <= DIM_W'((int'(min_n(cur.out_dim - tile_off)) + WPW - 1) / WPW);
              nbw       <= DIM_W'((int'(min_n(cur.out_dim - tile_off)) + 1) / 2);
              arr_clear <= 1'b1;
              i_cnt     <= '0;
              k_cnt     <= '0;
              x_pending <= 1'b1;
              ph        <= (cur.in_dim == 0) ? P_BIAS : P_COL;
            end

            P_COL: begin
              if (x_pending && k_cnt == 0 && fifo_almost_full) begin
                stall <= 1'b1;
              end else if (x_pending && !i_cnt[0]) begin
                rd_en    <= 1'b1;
                rd_deser <= 1'b1;
                rd_addr  <= in_base + ADDR_W'(i_cnt >> 1);
                rd_tag   <= '{kind: RD_X, idx: '0, last: 1'b0, xhalf: 1'b0};
                x_pending <= 1'b0;
              end else begin
                rd_en    <= 1'b1;
                rd_deser <= 1'b1;
                rd_addr  <= w_ptr;
                rd_tag   <= '{kind: RD_W, idx: k_cnt, last: (k_cnt == nwc - 1), xhalf: i_cnt[0]};
                w_ptr    <= w_ptr + 1'b1;
                x_pending <= 1'b0;
                if (k_cnt == nwc - 1) begin
                  k_cnt     <= '0;
                  x_pending <= 1'b1;
                  i_cnt     <= i_cnt + 1'b1;
                  if (i_cnt == cur.in_dim - 1) ph <= P_BIAS;
                end else begin
                  k_cnt <= k_cnt + 1'b1;
                end
              end
            end

            P_BIAS: begin
              rd_en    <= 1'b1;
              rd_deser <= 1'b1;
              rd_addr  <= cur.b_base + ADDR_W'(tile_off >> 1) + ADDR_W'(k_cnt);
              rd_tag   <= '{kind: RD_B, idx: k_cnt, last: (k_cnt == nbw - 1), xhalf: 1'b0};
              if (k_cnt == nbw - 1) begin
                k_cnt <= '0;
                ph    <= P_WAITB;
              end else begin
                k_cnt <= k_cnt + 1'b1;
              end
            end

            P_WAITB: begin
              if (bias_done) begin
                ser_start <= 1'b1;
                ser_count <= tw;
                ser_base  <= dst_base + ADDR_W'(tile_off >> 1);
                ph        <= P_SER;
              end
            end

            P_SER: begin
              if (ser_done) begin
                if (int'(tile_off) + N >= int'(cur.out_dim)) begin
                  layer <= layer + 1'b1;
                  ph    <= P_LAYER;
                  in_base <= dst_base;
                end else begin
                  tile_off <= tile_off + DIM_W'(N);
                  ph       <= P_TILE;
                end
              end
            end

            default: ph <= P_LAYER;
          endcase
        end

        default: state <= S_SLEEP;
      endcase
    end
  end
endmodule
