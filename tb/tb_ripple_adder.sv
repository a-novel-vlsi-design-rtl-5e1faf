// tb_ripple_adder: exhaustive self-check of a 6-bit ripple adder (the width
// of Adder1 and Adder3 in the 4x4 block): every a, b and carry in, result
// {cout, sum} compared with a + b + cin.
module tb_ripple_adder;
  localparam int W = 6;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  ripple_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        for (int c = 0; c < 2; c++) begin
          a = W'(i); b = W'(j); cin = 1'(c);
          #1;
          checks++;
          if ({cout, sum} != (W+1)'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d: got %0d", i, j, c, {cout, sum});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
