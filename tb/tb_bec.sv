// tb_bec: exhaustive test of the Binary to Excess-1 Converter at 4 bits
// (the function table: 0000 -> 0001, ..., 1110 -> 1111, 1111 -> 0000) and
// at 7 bits, against b + 1 computed by the bench.
module tb_bec;
  logic [3:0] b4, x4;
  logic [6:0] b7, x7;
  int checks = 0, failures = 0;

  bec #(.W(4)) dut4 (.b(b4), .x(x4));
  bec #(.W(7)) dut7 (.b(b7), .x(x7));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      b4 = 4'(i);
      #1;
      checks++;
      if (x4 !== 4'((i + 1) % 16)) begin
        failures++;
        $display("4-bit: b=%b x=%b", b4, x4);
      end
    end
    for (int i = 0; i < 128; i++) begin
      b7 = 7'(i);
      #1;
      checks++;
      if (x7 !== 7'((i + 1) % 128)) begin
        failures++;
        $display("7-bit: b=%b x=%b", b7, x7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
