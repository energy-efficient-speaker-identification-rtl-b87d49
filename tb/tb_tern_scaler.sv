// tb_tern_scaler: random accumulations and layer scales through the
// serializer's multiplier stage, compared with the reference (multiply,
// shift by 28, rectify, quantize).
module tb_tern_scaler;
  import sid_tb_pkg::*;
  logic [31:0] acc, sc, y;
  logic relu, quant;
  logic [4:0] qb;
  int checks = 0, failures = 0;

  tern_scaler dut (.acc(acc), .scale(sc), .relu_en(relu), .quant_en(quant), .qbits(qb), .y(y));

  initial begin
    for (int n = 0; n < 20000; n++) begin
      acc   = (n % 2) ? $urandom : 32'($signed(int'($urandom_range(0, 1 << 30)) - (1 << 29)));
      sc    = (n % 5 == 0) ? $urandom : 32'($urandom_range(1 << 20, 1 << 29));
      relu  = n[2];
      quant = n[3];
      qb    = 5'($urandom_range(0, 28));
      #1;
      checks++;
      if (y !== ref_scale(acc, sc, relu, quant, int'(qb))) begin
        failures++;
        if (failures < 10) $display("FAIL acc=%h sc=%h y=%h exp=%h", acc, sc, y,
                                    ref_scale(acc, sc, relu, quant, int'(qb)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
