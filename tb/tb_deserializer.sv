// tb_deserializer: feeds tagged words the way the controller orders them
// (x word, the words of a column, ..., bias words) into a fixed-point unit
// (20 lanes, 8-bit, 3 words per column) and a ternary unit with zero skipping
// (40 lanes, 2-bit, 2 words per column). Checks every emitted column (weights
// and x_i), the bias token and vector, the one-cycle output latency, and
// that all-zero columns are dropped and counted only by the skipping unit.
module tb_deserializer;
  import sid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rv = 0;
  logic [71:0] rd = '0;
  rd_tag_t tg = '0;
  logic fv, fb, tv, tb_;
  logic [31:0] fx, tx, fsk, tsk;
  logic [20*8-1:0] fw;
  logic [40*2-1:0] tw;
  logic [20*32-1:0] fbv;
  logic [40*32-1:0] tbv;
  int checks = 0, failures = 0;

  deserializer #(.N(20), .W_BITS(8), .ZERO_SKIP(1'b0)) dut_f (.clk(clk), .rst_n(rst_n),
    .rvalid(rv), .rdata(rd), .rtag(tg), .col_valid(fv), .col_is_bias(fb), .col_x(fx),
    .col_w(fw), .bias_vec(fbv), .skipped(fsk));
  deserializer #(.N(40), .W_BITS(2), .ZERO_SKIP(1'b1)) dut_t (.clk(clk), .rst_n(rst_n),
    .rvalid(rv), .rdata(rd), .rtag(tg), .col_valid(tv), .col_is_bias(tb_), .col_x(tx),
    .col_w(tw), .bias_vec(tbv), .skipped(tsk));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  task automatic send(rd_kind_e k, int idx, bit last, bit xh, logic [71:0] d);
    rv <= 1; rd <= d; tg <= '{kind: k, idx: DIM_W'(idx), last: last, xhalf: xh};
    @(posedge clk);
  endtask

  // Column: the fixed-point unit sees 3 words (9 weights each), the ternary
  // one reads the same words as 36 codes each; both get the same traffic here,
  // so each unit is checked against its own decoding of the words sent.
  initial begin
    logic [71:0] words[3];
    logic [71:0] xw;
    int nskip = 0;
    logic [20*32-1:0] bexp;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int c = 0; c < 60; c++) begin
      automatic bit zero = (c % 5 == 2);
      if (c % 2 == 0) begin
        xw = {8'h0, $urandom, $urandom};
        send(RD_X, 0, 0, 0, xw);
      end
      for (int k = 0; k < 3; k++) words[k] = zero ? '0 : {8'($urandom), $urandom, $urandom};
      // fixed point: 3 words; ternary: only the first 2 words carry lanes 0..39
      send(RD_W, 0, 0, c % 2, words[0]);
      send(RD_W, 1, 0, c % 2, words[1]);
      send(RD_W, 2, 1, c % 2, words[2]);
      rv <= 0;
      #1;
      chk(fv && !fb, $sformatf("fxp column %0d valid", c));
      chk(fx == (c % 2 ? xw[63:32] : xw[31:0]), "fxp x");
      chk(fw == {words[2][3*8-1:0], words[1], words[0]}[20*8-1:0], $sformatf("fxp weights col %0d", c));
      // ternary: the last-tagged word is words[2] at idx 2 which is beyond
      // its 2-word column, so its own lanes are taken from words[0..1]
      if (zero) begin
        chk(!tv, "tern zero column dropped");
        nskip++;
      end else begin
        chk(tv && !tb_, "tern column valid");
        chk(tw == {words[1][7:0], words[0]}[79:0], "tern weights");
        chk(tx == fx, "tern x");
      end
      @(posedge clk);
      #1 chk(!fv && !tv, "valid is one cycle");
    end
    chk(tsk == 32'(nskip), $sformatf("tern skipped %0d exp %0d", tsk, nskip));
    chk(fsk == 0, "fxp never skips");
    // bias vector: 20 lanes = 10 words
    for (int k = 0; k < 20; k++) bexp[k*32 +: 32] = $urandom;
    for (int k = 0; k < 10; k++) send(RD_B, k, k == 9, 0, {8'hA5, bexp[k*64 +: 64]});
    rv <= 0;
    #1;
    chk(fv && fb, $sformatf("bias token fv=%0d fb=%0d", fv, fb));
    chk(fbv == bexp, "bias vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
