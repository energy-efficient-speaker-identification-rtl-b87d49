// tb_controller: runs the controller (20 PUs, 8-bit weights) on a 3-layer
// header held in a small memory model. Every read request is compared in
// order with a schedule worked out here: header words in INIT, then per layer
// and tile the x words, the weight words of each column (3 per column, 2 in
// the 12-row tail tile), then the bias words. The test answers bias_done and
// ser_done after random delays, holds fifo_almost_full high at random and
// checks that no column starts while it is high, checks each serializer
// request (count and destination in the alternate buffer), the state
// sequence SLEEP -> INIT -> RUN -> SLEEP, done and the result location.
module tb_controller;
  import sid_pkg::*;
  localparam int N = 20, WB = 8, WPW = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, afull = 0, bias_done = 0, ser_done = 0;
  ctrl_state_e state;
  logic busy, done, rd_en, rd_deser, stall, arr_clear, relu, quant, ser_start;
  logic [ADDR_W-1:0] rd_addr, ser_base, out_base;
  rd_tag_t tag;
  logic [4:0] qb;
  logic [31:0] scale;
  logic [DIM_W-1:0] ser_count, out_dim;
  logic hdr_valid = 0;
  logic [71:0] hdr_data = '0;
  logic [71:0] hmem [17];
  int checks = 0, failures = 0;

  controller #(.N(N), .W_BITS(WB), .MAX_LAYERS(8)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .state(state), .busy(busy), .done(done), .rd_en(rd_en), .rd_addr(rd_addr), .rd_tag(tag),
    .rd_deser(rd_deser), .hdr_valid(hdr_valid), .hdr_data(hdr_data), .fifo_almost_full(afull),
    .bias_done(bias_done), .stall(stall), .arr_clear(arr_clear), .relu_en(relu), .quant_en(quant),
    .qbits(qb), .scale(scale), .ser_start(ser_start), .ser_count(ser_count), .ser_base(ser_base),
    .ser_done(ser_done), .out_base(out_base), .out_dim(out_dim));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  typedef struct { int kind; int addr; int idx; bit last; } req_t;
  req_t exp_q[$];
  int   ser_q[$];     // expected serializer requests: count, base pairs
  int dims[4] = '{7, 32, 12, 5};
  localparam int ACT_A = 40, ACT_B = 80;

  // header memory: one-cycle read, answers only non-deserializer reads
  always_ff @(posedge clk) begin
    hdr_valid <= rd_en && !rd_deser;
    if (rd_en && !rd_deser) hdr_data <= (int'(rd_addr) < 17) ? hmem[rd_addr] : '0;
  end

  int n_stall_seen = 0, n_ser = 0;
  logic afull_q = 0;
  // checker for read requests
  always @(posedge clk) begin
    afull_q <= afull;
    if (rst_n && rd_en && rd_deser) begin
      req_t e;
      if (exp_q.size() == 0) chk(0, "unexpected read");
      else begin
        e = exp_q.pop_front();
        chk(int'(tag.kind) == e.kind && int'(rd_addr) == e.addr && int'(tag.idx) == e.idx &&
            tag.last == e.last, $sformatf("read kind %0d addr %0d idx %0d last %0d, exp %0d %0d %0d %0d",
            tag.kind, rd_addr, tag.idx, tag.last, e.kind, e.addr, e.idx, e.last));
      end
    end
    if (stall) n_stall_seen++;
  end

  // a column start (x read, or first weight word of an odd column) may not follow afull
  always @(posedge clk)
    if (rst_n && rd_en && rd_deser && (tag.kind == RD_X || (tag.kind == RD_W && tag.idx == 0 && tag.xhalf)))
      chk(!afull_q, "column started while FIFO almost full");

  initial begin
    int wptr, bptr, inb, outb;
    // header
    for (int i = 0; i < 17; i++) hmem[i] = '0;
    hmem[0][7:0] = 3; hmem[0][24:8] = ACT_A; hmem[0][41:25] = ACT_B;
    wptr = 200; bptr = 1000;
    inb = ACT_A; outb = ACT_B;
    for (int l = 0; l < 3; l++) begin
      automatic int in_d = dims[l], out_d = dims[l+1];
      automatic layer_desc_t d = '0;
      d.in_dim = 12'(in_d); d.out_dim = 12'(out_d); d.w_base = 17'(wptr); d.b_base = 17'(bptr + 100*l);
      d.relu = 1; d.quant = l[0]; d.qbits = 5'(6 + l);
      hmem[1 + 2*l] = 72'(d);
      hmem[2 + 2*l] = 72'(32'h0100_0000 + l);
      for (int t = 0; t * N < out_d; t++) begin
        automatic int tw = (out_d - t*N > N) ? N : out_d - t*N;
        automatic int nw = (tw + WPW - 1) / WPW;
        for (int i = 0; i < in_d; i++) begin
          if (i % 2 == 0) exp_q.push_back('{0, inb + i/2, 0, 0});
          for (int k = 0; k < nw; k++) begin exp_q.push_back('{1, wptr, k, k == nw-1}); wptr++; end
        end
        for (int k = 0; k < (tw + 1) / 2; k++)
          exp_q.push_back('{2, bptr + 100*l + t*N/2 + k, k, k == (tw+1)/2 - 1});
        ser_q.push_back(tw); ser_q.push_back(outb + t*N/2);
      end
      begin automatic int tmp = inb; inb = outb; outb = tmp; end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 chk(state == S_SLEEP && !busy, "sleeps after reset");
    start <= 1;
    @(posedge clk);
    start <= 0;
    #1 chk(state == S_INIT, "init after start");
    fork
      begin : drive
        forever begin
          @(posedge clk);
          afull <= ($urandom_range(0, 3) == 0);
        end
      end
      begin : respond
        forever begin
          @(posedge clk);
          #1;
          if (rd_en && rd_deser && tag.kind == RD_B && tag.last) begin
            repeat ($urandom_range(1, 4)) @(posedge clk);
            bias_done <= 1; @(posedge clk); bias_done <= 0;
          end
        end
      end
      begin : respond_ser
        forever begin
          @(posedge clk);
          #1;
          if (ser_start) begin
            n_ser++;
            chk(ser_q.size() >= 2 && int'(ser_count) == ser_q[0] && int'(ser_base) == ser_q[1],
                $sformatf("serializer request %0d @%0d", ser_count, ser_base));
            if (ser_q.size() >= 2) begin void'(ser_q.pop_front()); void'(ser_q.pop_front()); end
            repeat ($urandom_range(1, 12)) @(posedge clk);
            ser_done <= 1; @(posedge clk); ser_done <= 0;
          end
        end
      end
      begin : finish_wait
        @(posedge done);
        #1;
      end
    join_any
    disable drive;
    disable respond;
    disable respond_ser;
    afull <= 0;
    chk(exp_q.size() == 0, $sformatf("%0d reads never issued", exp_q.size()));
    chk(n_ser == 4, $sformatf("%0d serializer requests, exp 4", n_ser));
    chk(int'(out_dim) == 5 && int'(out_base) == ACT_B, $sformatf("result at %0d len %0d", out_base, out_dim));
    chk(n_stall_seen > 0, "stall exercised");
    @(posedge clk);
    #1 chk(state == S_SLEEP && !busy, "back to sleep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog: state %0d, %0d reads and %0d serializer requests left", state, exp_q.size(), ser_q.size() / 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
