// tb_serializer: a fixed-point and a ternary serializer (8 lanes each) write
// random tiles of every length 1..8. Each BRAM write is checked (address,
// packing, zero upper half for an odd last element, ternary scaling through
// the reference), as are the number of writes, the cycle count from start to
// done (ceil(count/2) fixed-point, count ternary), and that the inputs may
// change right after start.
module tb_serializer;
  import sid_pkg::*;
  import sid_tb_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, relu = 0, quant = 0;
  logic [DIM_W-1:0] cnt = '0;
  logic [ADDR_W-1:0] base = '0;
  logic [N*32-1:0] res = '0;
  logic [31:0] sc = '0;
  logic [4:0] qb = '0;
  logic fb, fd, fwe, tbz, td, twe;
  logic [ADDR_W-1:0] fwa, twa;
  logic [71:0] fwd, twd;
  int checks = 0, failures = 0;

  serializer #(.N(N), .TERNARY(1'b0)) dut_f (.clk(clk), .rst_n(rst_n), .start(start), .count(cnt),
    .base(base), .res(res), .scale(sc), .relu_en(relu), .quant_en(quant), .qbits(qb),
    .busy(fb), .done(fd), .we(fwe), .waddr(fwa), .wdata(fwd));
  serializer #(.N(N), .TERNARY(1'b1)) dut_t (.clk(clk), .rst_n(rst_n), .start(start), .count(cnt),
    .base(base), .res(res), .scale(sc), .relu_en(relu), .quant_en(quant), .qbits(qb),
    .busy(tbz), .done(td), .we(twe), .waddr(twa), .wdata(twd));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] v[N], s[N];
    int c, fw, tw_, fdone, tdone, cyc;
    logic [ADDR_W-1:0] b;
    bit r, q; int qq; logic [31:0] scv;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 80; t++) begin
      c = 1 + (t % N);
      b = ADDR_W'($urandom_range(0, 60000));
      r = t[0]; q = t[1]; qq = int'($urandom_range(0, 28));
      scv = 32'($urandom_range(1 << 24, 1 << 28));
      for (int j = 0; j < N; j++) begin
        v[j] = $urandom;
        s[j] = ref_scale(v[j], scv, r, q, qq);
        res[j*32 +: 32] <= v[j];
      end
      start <= 1; cnt <= DIM_W'(c); base <= b; sc <= scv; relu <= r; quant <= q; qb <= 5'(qq);
      @(posedge clk);
      start <= 0; res <= '1; sc <= '0;        // inputs are free after start
      fw = 0; tw_ = 0; fdone = -1; tdone = -1; cyc = 0;
      while (fdone < 0 || tdone < 0) begin
        @(posedge clk);
        cyc++;
        #1;
        if (fwe) begin
          chk(fwa == b + ADDR_W'(fw), "fxp address");
          chk(fwd[31:0] == v[2*fw], $sformatf("fxp lo %h exp %h", fwd[31:0], v[2*fw]));
          chk(fwd[63:32] == ((2*fw + 1 < c) ? v[2*fw+1] : 32'h0), "fxp hi");
          chk(fwd[71:64] == 8'h0, "fxp pad");
          fw++;
        end
        if (twe) begin
          chk(twa == b + ADDR_W'(tw_), "tern address");
          chk(twd[31:0] == s[2*tw_], $sformatf("tern lo %h exp %h", twd[31:0], s[2*tw_]));
          chk(twd[63:32] == ((2*tw_ + 1 < c) ? s[2*tw_+1] : 32'h0), "tern hi");
          tw_++;
        end
        if (fd && fdone < 0) fdone = cyc;
        if (td && tdone < 0) tdone = cyc;
        if (cyc > 100) break;
      end
      chk(fw == (c + 1) / 2 && tw_ == (c + 1) / 2, "number of writes");
      chk(fdone == (c + 1) / 2, $sformatf("fxp done after %0d cycles, count %0d", fdone, c));
      chk(tdone == c, $sformatf("tern done after %0d cycles, count %0d", tdone, c));
      @(posedge clk);
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
