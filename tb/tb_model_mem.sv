// tb_model_mem: writes random words to addresses spread over all 140 blocks,
// including both ends of every block, then reads them back (one-cycle
// latency), first one address at a time and then back to back with the
// address changing every cycle, and checks that an address past the last
// block reads as zero.
module tb_model_mem;
  import sid_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [ADDR_W-1:0] wa = '0, ra = '0;
  logic [71:0] wd = '0, rd;
  logic [71:0] ref_m [int];
  int checks = 0, failures = 0;

  model_mem dut (.clk(clk), .we(we), .waddr(wa), .wdata(wd), .re(re), .raddr(ra), .rdata(rd));

  initial begin
    int addrs[$];
    for (int b = 0; b < N_BRAM; b++) begin
      addrs.push_back(b * 512); addrs.push_back(b * 512 + 511);
      addrs.push_back(b * 512 + int'($urandom_range(1, 510)));
    end
    @(posedge clk);
    foreach (addrs[i]) begin
      automatic logic [71:0] v = {8'($urandom), $urandom, $urandom};
      we <= 1; wa <= ADDR_W'(addrs[i]); wd <= v; ref_m[addrs[i]] = v;
      @(posedge clk);
    end
    // out-of-range write must not alias onto a real block
    we <= 1; wa <= ADDR_W'(N_BRAM * 512 + 3); wd <= '1;
    @(posedge clk);
    we <= 0;
    foreach (addrs[i]) begin
      re <= 1; ra <= ADDR_W'(addrs[i]);
      @(posedge clk);
      #1;
      checks++;
      if (rd !== ref_m[addrs[i]]) begin
        failures++; $display("FAIL addr %0d got %h exp %h", addrs[i], rd, ref_m[addrs[i]]);
      end
    end
    // Back-to-back reads in shuffled order: the address moves on to the next
    // word before the previous word's data is checked, as the controller does.
    addrs.shuffle();
    re <= 1; ra <= ADDR_W'(addrs[0]);
    for (int i = 0; i < addrs.size(); i++) begin
      @(posedge clk);
      #1 ra = ADDR_W'(addrs[(i + 1) % addrs.size()]);
      #1 checks++;
      if (rd !== ref_m[addrs[i]]) begin
        failures++; $display("FAIL pipelined addr %0d got %h exp %h", addrs[i], rd, ref_m[addrs[i]]);
      end
    end
    re <= 1; ra <= ADDR_W'(N_BRAM * 512 + 3);
    @(posedge clk);
    #1 checks++;
    if (rd !== '0) begin failures++; $display("FAIL out of range read %h", rd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
