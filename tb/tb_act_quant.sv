// tb_act_quant: random and corner inputs through the rectify/quantize stage,
// compared with the reference model for every mode combination.
module tb_act_quant;
  import sid_tb_pkg::*;
  logic [31:0] x, y;
  logic relu, quant;
  logic [4:0] qb;
  int checks = 0, failures = 0;

  act_quant dut (.x(x), .relu_en(relu), .quant_en(quant), .qbits(qb), .y(y));

  initial begin
    logic [31:0] corners[$] = '{32'h0, 32'h1000_0000, 32'h1000_0001, 32'h0FFF_FFFF,
                                32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0800_0000};
    for (int n = 0; n < 20000; n++) begin
      x     = (n < 8 * 64) ? corners[n % 8] : ((n % 3) ? $urandom : 32'($urandom_range(0, 1 << 29)));
      relu  = n[3];
      quant = n[4];
      qb    = 5'($urandom_range(0, 31));
      #1;
      checks++;
      if (y !== ref_aq(x, relu, quant, int'(qb))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h relu=%b quant=%b qb=%0d y=%h exp=%h", x, relu, quant, qb, y,
                                    ref_aq(x, relu, quant, int'(qb)));
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
