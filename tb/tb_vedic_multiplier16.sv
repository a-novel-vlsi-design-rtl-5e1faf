// tb_vedic_multiplier16: self-check of the 16-bit form of the Vedic multiplier
// (WIDTH = 16, built from four 8-bit Vedic multipliers). Corner operands and
// 200000 random pairs; the 32-bit product is compared with x*y. As in the
// 8-bit test, the carry-select pass-through (Cin = 0) and increment (Cin = 1)
// cases are counted from the reference product, and each must occur.
module tb_vedic_multiplier16;
  logic [15:0] x, y;
  logic [31:0] p;
  int checks = 0, failures = 0;
  int n_pass = 0, n_incr = 0;

  vedic_multiplier #(.WIDTH(16)) dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] tx, ty);
    longint unsigned prod, p3;
    x = tx; y = ty;
    #1;
    prod = longint'(tx) * longint'(ty);
    p3   = longint'(tx[15:8]) * longint'(ty[15:8]);
    if ((prod >> 25) != (p3 >> 9)) n_incr++;
    else                           n_pass++;
    checks++;
    if (p != 32'(prod)) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h: got %h", tx, ty, p);
    end
  endtask

  initial begin
    apply(16'h0000, 16'h0000);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'hFFFF, 16'h0001);
    apply(16'h8000, 16'h8000);
    apply(16'h00FF, 16'hFF00);
    for (int n = 0; n < 200000; n++) apply(16'($urandom), 16'($urandom));
    $display("carry-select: pass-through %0d, increment %0d", n_pass, n_incr);
    checks += 2;
    if (n_pass == 0) begin failures++; $display("FAIL pass-through path never used"); end
    if (n_incr == 0) begin failures++; $display("FAIL increment path never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
