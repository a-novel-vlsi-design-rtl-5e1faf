// tb_vedic_mul4x4: exhaustive self-check of the 4x4 Vedic multiplier. All 256
// operand pairs are applied and the 8-bit product compared with x*y.
module tb_vedic_mul4x4;
  logic [3:0] x, y;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_mul4x4 dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        x = 4'(i); y = 4'(j);
        #1;
        checks++;
        if (p != 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
