// tb_csla_bec: the BEC carry-select adder at 16 bits (five groups) and at
// 8 bits (the finger width, last group shortened), exhaustive at 8 bits and
// random plus carry-boundary cases at 16 bits, against the bench's own sum.
module tb_csla_bec;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  int checks = 0, failures = 0;

  csla_bec #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  csla_bec #(.W(8))  dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));

  task automatic check16(logic [15:0] a, logic [15:0] b, logic c);
    logic [16:0] ref_sum;
    a16 = a; b16 = b; ci16 = c;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b} + {16'b0, c};
    checks++;
    if ({co16, s16} !== ref_sum) begin
      failures++;
      $display("16-bit: %h + %h + %0d = %h, expected %h", a, b, c, {co16, s16}, ref_sum);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          logic [8:0] ref_sum;
          a8 = 8'(i); b8 = 8'(j); ci8 = c[0];
          #1;
          ref_sum = 9'(i + j + c);
          checks++;
          if ({co8, s8} !== ref_sum) begin
            failures++;
            if (failures < 10) $display("8-bit: %0d + %0d + %0d = %0d", i, j, c, {co8, s8});
          end
        end
    // Carries that ripple into and through every group boundary.
    for (int k = 0; k < 16; k++) begin
      check16(16'hFFFF >> k, 16'h0001, 1'b0);
      check16(16'hFFFF >> k, 16'h0000, 1'b1);
      check16(16'(1 << k), 16'(1 << k), 1'b1);
    end
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    repeat (20000) check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
