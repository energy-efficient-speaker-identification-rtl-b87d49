// tb_fifo3: random push/pop traffic against a queue model; checks data order,
// empty/full/almost_full/count and simultaneous push and pop.
module tb_fifo3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, empty, full, afull;
  logic [31:0] din = '0, dout;
  logic [1:0] count;
  logic [31:0] q[$];
  int checks = 0, failures = 0, n_full = 0, n_both = 0;

  fifo3 dut (.clk(clk), .rst_n(rst_n), .push(push), .din(din), .pop(pop), .dout(dout),
             .empty(empty), .full(full), .almost_full(afull), .count(count));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      automatic bit p, o;
      #1;
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == 3), "full");
      chk(afull == (q.size() >= 2), "almost_full");
      chk(int'(count) == q.size(), "count");
      if (q.size() > 0) chk(dout == q[0], $sformatf("dout %h exp %h", dout, q[0]));
      p = ($urandom_range(0, 99) < 55) && q.size() < 3;
      o = ($urandom_range(0, 99) < 45) && q.size() > 0;
      push <= p; pop <= o; din <= $urandom;
      #1;
      if (p && o) n_both++;
      if (q.size() == 3) n_full++;
      @(posedge clk);
      if (o) void'(q.pop_front());
      if (p) q.push_back(din);
    end
    chk(n_full > 0 && n_both > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
