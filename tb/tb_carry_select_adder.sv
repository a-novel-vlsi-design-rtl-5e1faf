// tb_carry_select_adder: exhaustive self-check of the carry-select stage at
// 3 bits (8-bit multiplier) and 7 bits (16-bit form). Expected: with cin = 0
// the operand passes through and cout = 0; with cin = 1, {cout, sum} = a + 1.
module tb_carry_select_adder;
  logic [2:0] a3, s3;
  logic       ci3, co3;
  logic [6:0] a7, s7;
  logic       ci7, co7;
  int checks = 0, failures = 0;

  carry_select_adder #(.W(3)) dut3 (.a(a3), .cin(ci3), .sum(s3), .cout(co3));
  carry_select_adder #(.W(7)) dut7 (.a(a7), .cin(ci7), .sum(s7), .cout(co7));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 128; i++) begin
        a3 = 3'(i); ci3 = 1'(c);
        a7 = 7'(i); ci7 = 1'(c);
        #1;
        checks += 2;
        if ({co3, s3} != 4'(i % 8 + c)) begin
          failures++;
          $display("FAIL3 %0d+%0d: got %0d", i % 8, c, {co3, s3});
        end
        if ({co7, s7} != 8'(i + c)) begin
          failures++;
          $display("FAIL7 %0d+%0d: got %0d", i, c, {co7, s7});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
