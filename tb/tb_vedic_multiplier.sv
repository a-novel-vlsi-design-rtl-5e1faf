// tb_vedic_multiplier: end-to-end self-check of the 8-bit Vedic multiplier at
// its default parameters. All 65536 operand pairs are applied and the 16-bit
// product compared with x*y.
//
// The design has one data-dependent mechanism, the carry-select stage: when
// the Kogge-Stone carry Cin is 0 the top product bits are p3[7:5] passed
// straight through, when it is 1 they are p3[7:5] + 1 from the half adders.
// Cin is derived here from the reference product alone (Cin = 1 exactly when
// P[15:13] differs from (XH*YH)[7:5]); both cases are counted and a case that
// never occurs counts as a failure. The circuit has no clock, so there is no
// latency to check.
module tb_vedic_multiplier;
  logic [7:0]  x, y;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_pass = 0, n_incr = 0;

  vedic_multiplier dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        int unsigned prod, p3;
        x = 8'(i); y = 8'(j);
        #1;
        prod = i * j;
        p3   = (i >> 4) * (j >> 4);
        if ((prod >> 13) != (p3 >> 5)) n_incr++;
        else                           n_pass++;
        checks++;
        if (p != 16'(prod)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    $display("carry-select: pass-through %0d, increment %0d", n_pass, n_incr);
    checks += 2;
    if (n_pass == 0) begin failures++; $display("FAIL pass-through path never used"); end
    if (n_incr == 0) begin failures++; $display("FAIL increment path never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
