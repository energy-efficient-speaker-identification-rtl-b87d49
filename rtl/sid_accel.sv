// sid_accel: one speaker-ID inference accelerator on the programmable logic.
//
// It evaluates a fully connected network layer by layer, out = f(W x + b),
// entirely from on-chip block RAM. Data path (the document's Figure 3-3 flow):
//   model_mem -> deserializer -> fifo3 -> pu_array -> serializer -> model_mem
// The controller (the routing unit's FSM) issues one BRAM read per cycle: the
// input word, the words of one weight column, and at the end of a tile the
// bias words. The deserializer assembles each column and sends it, with its
// input x_i, through the 3-entry FIFO into the linear PU array, which
// accumulates one column per token. After the bias token the serializer takes
// the array outputs and writes them, two per word, into the other activation
// buffer.
//
// Two builds share this module:
//   TERNARY = 0: fixed-point PUs with a multiplier each (W_BITS-bit weights,
//                8 by default), ReLU and quantization inside every PU.
//   TERNARY = 1: ternary PUs (add/subtract only, 2-bit weights), the layer
//                constant Wp applied by one multiplier in the serializer,
//                all-zero columns skipped when ZERO_SKIP is set.
//
// Processing-system side: while busy is low the host_* ports own the BRAM
// (write the model, the features; read the results), standing in for the AXI
// BRAM controller. start begins an evaluation; done pulses at the end, with
// out_base/out_dim giving the result's place. Host accesses while busy are
// ignored. host_rdata follows host_re by one cycle.
module sid_accel
  import sid_pkg::*;
#(
  parameter int N          = 256,
  parameter int W_BITS     = 8,
  parameter bit TERNARY    = 1'b0,
  parameter bit ZERO_SKIP  = 1'b0,
  parameter int N_BLK      = N_BRAM,
  parameter int MAX_LAYERS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_waddr,
  input  logic [MEM_W-1:0]  host_wdata,
  input  logic              host_re,
  input  logic [ADDR_W-1:0] host_raddr,
  output logic [MEM_W-1:0]  host_rdata,
  output logic [ADDR_W-1:0] out_base,
  output logic [DIM_W-1:0]  out_dim,
  output logic [31:0]       skipped_cols,
  output logic [31:0]       stall_cycles
);
  localparam int FW = 1 + DATA_W + N * W_BITS;   // FIFO token: bias flag, x, column

  ctrl_state_e       state;
  logic              rd_en, rd_deser;
  logic [ADDR_W-1:0] rd_addr;
  rd_tag_t           rd_tag, rtag_q;
  logic              rvalid_q, hdr_valid_q;
  logic              stall, arr_clear, relu_en, quant_en, ser_start, ser_done, ser_busy;
  logic [4:0]        qbits;
  logic [DATA_W-1:0] scale;
  logic [DIM_W-1:0]  ser_count;
  logic [ADDR_W-1:0] ser_base;
  logic              ser_we;
  logic [ADDR_W-1:0] ser_waddr;
  logic [MEM_W-1:0]  ser_wdata;

  logic              m_we, m_re;
  logic [ADDR_W-1:0] m_waddr, m_raddr;
  logic [MEM_W-1:0]  m_wdata, m_rdata;

  logic                col_valid, col_is_bias;
  logic [DATA_W-1:0]   col_x;
  logic [N*W_BITS-1:0] col_w;
  logic [N*DATA_W-1:0] bias_vec, res;

  logic              f_empty, f_full, f_afull;
  logic [FW-1:0]     f_dout;
  logic [$clog2(4)-1:0] f_count;
  logic              tok_valid, tok_bias;

  // ---------------- BRAM and its port arbitration ----------------
  always_comb begin
    if (busy) begin
      m_we    = ser_we;     m_waddr = ser_waddr;  m_wdata = ser_wdata;
      m_re    = rd_en;      m_raddr = rd_addr;
    end else begin
      m_we    = host_we;    m_waddr = host_waddr; m_wdata = host_wdata;
      m_re    = host_re;    m_raddr = host_raddr;
    end
  end

  model_mem #(.N_BLK(N_BLK)) u_mem (
    .clk(clk), .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
    .re(m_re), .raddr(m_raddr), .rdata(m_rdata));

  assign host_rdata = m_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rvalid_q    <= 1'b0;
      hdr_valid_q <= 1'b0;
      rtag_q      <= '0;
    end else begin
      rvalid_q    <= busy && rd_en && rd_deser;
      hdr_valid_q <= busy && rd_en && !rd_deser;
      rtag_q      <= rd_tag;
    end
  end

  // ---------------- control ----------------
  controller #(.N(N), .W_BITS(W_BITS), .MAX_LAYERS(MAX_LAYERS)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .state(state), .busy(busy), .done(done),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_tag(rd_tag), .rd_deser(rd_deser),
    .hdr_valid(hdr_valid_q), .hdr_data(m_rdata),
    .fifo_almost_full(f_afull), .bias_done(tok_valid && tok_bias), .stall(stall),
    .arr_clear(arr_clear), .relu_en(relu_en), .quant_en(quant_en), .qbits(qbits),
    .scale(scale), .ser_start(ser_start), .ser_count(ser_count), .ser_base(ser_base),
    .ser_done(ser_done), .out_base(out_base), .out_dim(out_dim));

  // ---------------- deserializer -> FIFO -> PU array ----------------
  deserializer #(.N(N), .W_BITS(W_BITS), .ZERO_SKIP(ZERO_SKIP)) u_deser (
    .clk(clk), .rst_n(rst_n), .rvalid(rvalid_q), .rdata(m_rdata), .rtag(rtag_q),
    .col_valid(col_valid), .col_is_bias(col_is_bias), .col_x(col_x), .col_w(col_w),
    .bias_vec(bias_vec), .skipped(skipped_cols));

  fifo3 #(.WIDTH(FW), .DEPTH(3)) u_fifo (
    .clk(clk), .rst_n(rst_n), .push(col_valid), .din({col_is_bias, col_x, col_w}),
    .pop(!f_empty), .dout(f_dout), .empty(f_empty), .full(f_full),
    .almost_full(f_afull), .count(f_count));

  // the array takes one token per cycle, so the FIFO drains as fast as it fills
  assign tok_valid = !f_empty;
  assign tok_bias  = f_dout[FW-1];

  pu_array #(.N(N), .W_BITS(W_BITS), .TERNARY(TERNARY)) u_arr (
    .clk(clk), .rst_n(rst_n), .clear(arr_clear),
    .col_valid(tok_valid && !tok_bias), .x(f_dout[FW-2 -: DATA_W]),
    .w_col(f_dout[N*W_BITS-1:0]), .bias_add(tok_valid && tok_bias),
    .bias_vec(bias_vec), .relu_en(relu_en), .quant_en(quant_en), .qbits(qbits),
    .res(res));

  // ---------------- serializer ----------------
  serializer #(.N(N), .TERNARY(TERNARY)) u_ser (
    .clk(clk), .rst_n(rst_n), .start(ser_start), .count(ser_count), .base(ser_base),
    .res(res), .scale(scale), .relu_en(relu_en), .quant_en(quant_en), .qbits(qbits),
    .busy(ser_busy), .done(ser_done), .we(ser_we), .waddr(ser_waddr), .wdata(ser_wdata));

  always_ff @(posedge clk) begin
    if (!rst_n)                stall_cycles <= '0;
    else if (start && !busy)   stall_cycles <= '0;
    else if (stall)            stall_cycles <= stall_cycles + 1;
  end

  // The serializer only ever runs while the controller is busy.
  a_ser_in_run : assert property (@(posedge clk) disable iff (!rst_n) ser_busy |-> busy)
    else $error("sid_accel: serializer active outside a run");
endmodule
