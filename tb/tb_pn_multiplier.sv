// tb_pn_multiplier: every 8-bit sample times both chip values, against
// +din and -din (modulo 256) computed by the bench.
module tb_pn_multiplier;
  logic signed [7:0] din, dout;
  logic              pn;
  int checks = 0, failures = 0;

  pn_multiplier #(.DATA_W(8)) dut (.din(din), .pn(pn), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++)
      for (int c = 0; c < 2; c++) begin
        int expv;
        din = 8'(i); pn = c[0];
        #1;
        expv = (c != 0) ? i : -i;
        checks++;
        if (dout !== 8'(expv)) begin
          failures++;
          $display("din=%0d pn=%0d dout=%0d", din, pn, dout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
