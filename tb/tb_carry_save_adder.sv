// tb_carry_save_adder: self-check of an 8-bit carry save adder (the width used
// by the 8-bit multiplier). Random and corner operands; checks that
// s == a^b^c bit by bit and that s + 2*cy == a + b + c.
module tb_carry_save_adder;
  localparam int W = 8;
  logic [W-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  carry_save_adder #(.W(W)) dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, tb_, tc);
    a = ta; b = tb_; c = tc;
    #1;
    checks++;
    if (s != (ta ^ tb_ ^ tc) ||
        (W+2)'(s) + ((W+2)'(cy) << 1) != (W+2)'(ta) + (W+2)'(tb_) + (W+2)'(tc)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h c=%h: s=%h cy=%h", ta, tb_, tc, s, cy);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, '0, '0);
    apply('1, '1, '0);
    for (int n = 0; n < 20000; n++) apply(W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
