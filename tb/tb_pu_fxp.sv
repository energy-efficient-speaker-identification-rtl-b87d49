// tb_pu_fxp: streams random dot products through one fixed-point PU (8-bit
// weights) with random gaps, a bias step and a random output mode, and
// compares the accumulator and output with the reference after each one.
module tb_pu_fxp;
  import sid_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, en = 0, bias_add = 0, relu = 0, quant = 0;
  logic [31:0] x = '0, bias = '0, acc, y;
  logic [7:0] w = '0;
  logic [4:0] qb = '0;
  int checks = 0, failures = 0;

  pu_fxp #(.W_BITS(8)) dut (.clk(clk), .rst_n(rst_n), .clear(clear), .en(en), .x(x), .w(w),
    .bias_add(bias_add), .bias(bias), .relu_en(relu), .quant_en(quant), .qbits(qb),
    .acc(acc), .y(y));

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      automatic logic [31:0] r = 0;
      automatic int len = int'($urandom_range(1, 60));
      clear <= 1; @(posedge clk); clear <= 0;
      for (int i = 0; i < len; i++) begin
        automatic logic [31:0] xv = (t % 4 == 0) ? $urandom : 32'($urandom_range(0, 1 << 28));
        automatic logic [7:0]  wv = 8'($urandom);
        if ($urandom_range(0, 3) == 0) begin en <= 0; @(posedge clk); end
        en <= 1; x <= xv; w <= wv;
        r = r + ref_term(xv, int'($signed(wv)), 8);
        @(posedge clk);
      end
      en <= 0;
      bias <= $urandom; bias_add <= 1;
      #1 r = r + bias;
      @(posedge clk);
      bias_add <= 0;
      relu <= t[0]; quant <= t[1]; qb <= 5'($urandom_range(0, 28));
      #1;
      checks++;
      if (acc !== r) begin failures++; if (failures < 10) $display("FAIL acc %h exp %h", acc, r); end
      checks++;
      if (y !== ref_aq(r, relu, quant, int'(qb))) begin
        failures++; if (failures < 10) $display("FAIL y %h exp %h", y, ref_aq(r, relu, quant, int'(qb)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
