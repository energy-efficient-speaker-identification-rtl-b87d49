// tb_pu_array: a fixed-point array (12 PUs, 8-bit weights) and a ternary
// array (12 PUs) are fed the same random column stream with gaps, then a bias
// step; every PU output is compared with the reference dot product. The
// fixed-point outputs also go through a random output mode.
module tb_pu_array;
  import sid_tb_pkg::*;
  localparam int N = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, cv = 0, ba = 0, relu = 0, quant = 0;
  logic [4:0] qb = '0;
  logic [31:0] x = '0;
  logic [N*8-1:0] wf = '0;
  logic [N*2-1:0] wt = '0;
  logic [N*32-1:0] bv = '0, rf, rt;
  int checks = 0, failures = 0;

  pu_array #(.N(N), .W_BITS(8), .TERNARY(1'b0)) dut_f (.clk(clk), .rst_n(rst_n), .clear(clear),
    .col_valid(cv), .x(x), .w_col(wf), .bias_add(ba), .bias_vec(bv), .relu_en(relu),
    .quant_en(quant), .qbits(qb), .res(rf));
  pu_array #(.N(N), .W_BITS(2), .TERNARY(1'b1)) dut_t (.clk(clk), .rst_n(rst_n), .clear(clear),
    .col_valid(cv), .x(x), .w_col(wt), .bias_add(ba), .bias_vec(bv), .relu_en(relu),
    .quant_en(quant), .qbits(qb), .res(rt));

  initial begin
    logic [31:0] accf[N], acct[N];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 100; t++) begin
      automatic int len = int'($urandom_range(1, 40));
      clear <= 1; @(posedge clk); clear <= 0;
      for (int j = 0; j < N; j++) begin accf[j] = 0; acct[j] = 0; end
      for (int i = 0; i < len; i++) begin
        automatic logic [31:0] xv = 32'($urandom_range(0, 1 << 28));
        automatic bit gap = ($urandom_range(0, 3) == 0);
        automatic logic [N*8-1:0] wfv = {$urandom, $urandom, $urandom};
        automatic logic [N*2-1:0] wtv = 24'($urandom);
        cv <= !gap; x <= xv; wf <= wfv; wt <= wtv;
        if (!gap)
          for (int j = 0; j < N; j++) begin
            accf[j] = accf[j] + ref_term(xv, int'($signed(wfv[j*8 +: 8])), 8);
            acct[j] = acct[j] + ((wtv[j*2 +: 2] == 2'b01) ? xv : (wtv[j*2 +: 2] == 2'b11) ? -xv : 32'd0);
          end
        @(posedge clk);
      end
      cv <= 0;
      for (int j = 0; j < N; j++) bv[j*32 +: 32] <= $urandom;
      ba <= 1;
      #1;
      for (int j = 0; j < N; j++) begin accf[j] += bv[j*32 +: 32]; acct[j] += bv[j*32 +: 32]; end
      @(posedge clk);
      ba <= 0; relu <= t[0]; quant <= t[1]; qb <= 5'($urandom_range(0, 28));
      #1;
      for (int j = 0; j < N; j++) begin
        checks += 2;
        if (rf[j*32 +: 32] !== ref_aq(accf[j], relu, quant, int'(qb))) begin
          failures++; if (failures < 10) $display("FAIL fxp pu %0d: %h exp %h", j, rf[j*32 +: 32], ref_aq(accf[j], relu, quant, int'(qb)));
        end
        if (rt[j*32 +: 32] !== acct[j]) begin
          failures++; if (failures < 10) $display("FAIL tern pu %0d: %h exp %h", j, rt[j*32 +: 32], acct[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
