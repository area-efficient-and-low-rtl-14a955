// tb_ce_finger: drives random samples, chips, enables and dumps into one
// estimator finger and compares the output register with a bench model of
// the 8-bit (modulo 256) correlation plus the normalising term.
module tb_ce_finger;
  logic              clk = 1'b0, rst, en, acc_rst, pn;
  logic signed [7:0] din, norm, coeff;
  int checks = 0, failures = 0, n_dump = 0;
  int acc_m = 0, coeff_m = 0;

  ce_finger #(.DATA_W(8)) dut (
    .clk(clk), .rst(rst), .en(en), .acc_rst(acc_rst), .pn(pn),
    .din(din), .norm(norm), .coeff(coeff)
  );

  always #5 clk = ~clk;

  function automatic int wrap8(int v);
    return int'(signed'(8'(v)));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 0; acc_rst = 0; pn = 0; din = 0; norm = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      int prod;
      en      = ($urandom_range(0, 3) != 0);
      acc_rst = ($urandom_range(0, 15) == 0);
      pn      = 1'($urandom);
      din     = 8'($urandom);
      norm    = 8'($urandom);
      prod    = pn ? int'(din) : -int'(din);
      @(posedge clk);
      if (acc_rst) begin
        coeff_m = wrap8(acc_m + int'(norm));
        acc_m   = en ? wrap8(prod) : 0;
        n_dump++;
      end else if (en) begin
        acc_m = wrap8(acc_m + prod);
      end
      @(negedge clk);
      checks++;
      if (int'(coeff) != coeff_m) begin
        failures++;
        $display("t=%0d coeff=%0d expected %0d", t, coeff, coeff_m);
      end
    end
    checks++;
    if (n_dump == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
