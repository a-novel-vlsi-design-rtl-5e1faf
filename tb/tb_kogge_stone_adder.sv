// tb_kogge_stone_adder: self-check of the Kogge-Stone adder at 8 bits (the
// width used in the 8-bit multiplier), exhaustively, and at 16 bits (the
// 16-bit form) with random and long-carry operands. {cout, sum} is compared
// with a + b.
module tb_kogge_stone_adder;
  logic [7:0]  a8, b8, s8;
  logic        c8;
  logic [15:0] a16, b16, s16;
  logic        c16;
  int checks = 0, failures = 0;

  kogge_stone_adder #(.W(8))  dut8  (.a(a8),  .b(b8),  .sum(s8),  .cout(c8));
  kogge_stone_adder #(.W(16)) dut16 (.a(a16), .b(b16), .sum(s16), .cout(c16));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply16(input logic [15:0] ta, tb_);
    a16 = ta; b16 = tb_;
    #1;
    checks++;
    if ({c16, s16} != 17'(ta) + 17'(tb_)) begin
      failures++;
      if (failures < 10) $display("FAIL16 %h+%h: got %h", ta, tb_, {c16, s16});
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if ({c8, s8} != 9'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d+%0d: got %0d", i, j, {c8, s8});
        end
      end
    end
    apply16(16'hFFFF, 16'h0001);
    apply16(16'h7FFF, 16'h0001);
    apply16(16'hFFFF, 16'hFFFF);
    apply16(16'h00FF, 16'h0001);
    for (int n = 0; n < 20000; n++) apply16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
