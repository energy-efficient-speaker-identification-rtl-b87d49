// tb_pu_tern: random ternary dot products (codes 00, 01, 11 and the unused
// 10) with gaps and a bias step through one ternary PU; the accumulator is
// compared with the reference after each one.
module tb_pu_tern;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, en = 0, bias_add = 0;
  logic [31:0] x = '0, bias = '0, acc;
  logic [1:0] w = '0;
  int checks = 0, failures = 0;

  pu_tern dut (.clk(clk), .rst_n(rst_n), .clear(clear), .en(en), .x(x), .w(w),
               .bias_add(bias_add), .bias(bias), .acc(acc));

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      automatic logic [31:0] r = 0;
      automatic int len = int'($urandom_range(1, 80));
      clear <= 1; @(posedge clk); clear <= 0;
      for (int i = 0; i < len; i++) begin
        automatic logic [31:0] xv = $urandom;
        automatic logic [1:0]  wv = 2'($urandom);
        automatic bit gap = ($urandom_range(0, 4) == 0);
        en <= !gap; x <= xv; w <= wv;
        if (!gap) r = r + ((wv == 2'b01) ? xv : (wv == 2'b11) ? -xv : 32'd0);
        @(posedge clk);
      end
      en <= 0;
      bias <= $urandom; bias_add <= 1;
      #1 r = r + bias;
      @(posedge clk);
      bias_add <= 0;
      #1;
      checks++;
      if (acc !== r) begin failures++; if (failures < 10) $display("FAIL acc %h exp %h", acc, r); end
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
