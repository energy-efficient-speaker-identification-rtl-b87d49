// tb_bram_sdp: random writes and reads against a shadow array; checks the
// one-cycle read latency, read-first behaviour on a same-address collision
// and that rdata holds while re is low.
module tb_bram_sdp;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [8:0] wa, ra;
  logic [71:0] wd, rd;
  logic [71:0] shadow [512];
  int checks = 0, failures = 0;

  bram_sdp dut (.clk(clk), .we(we), .waddr(wa), .wdata(wd), .re(re), .raddr(ra), .rdata(rd));

  task automatic chk(logic [71:0] exp, string what);
    checks++;
    if (rd !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, rd, exp); end
  endtask

  initial begin
    logic [71:0] exp, held;
    we = 0; re = 0; wa = 0; ra = 0; wd = 0;
    for (int i = 0; i < 512; i++) shadow[i] = '0;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      we <= $urandom_range(0, 1); wa <= 9'($urandom); wd <= {8'($urandom), $urandom, $urandom};
      re <= 1; ra <= (n % 7 == 0) ? wa : 9'($urandom);
      #1; // let the nonblocking updates settle before sampling
      @(posedge clk);
      exp = shadow[ra];                       // read-first: old contents
      if (we) shadow[wa] = wd;
      #1;
      chk(exp, "read");
    end
    // hold while re low
    re <= 0; we <= 0;
    held = rd;
    repeat (3) @(posedge clk);
    #1 chk(held, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
