// tb_rr_finger: random samples, chips, coefficients, enables and dumps into
// one receiver finger; the product output is compared every clock with a
// bench model (8-bit wrapping accumulator, dump register, registered
// 8x8 signed product).
module tb_rr_finger;
  logic               clk = 1'b0, rst, en, acc_rst, pn;
  logic signed [7:0]  din, coeff;
  logic signed [15:0] prod;
  int checks = 0, failures = 0, n_dump = 0;
  int acc_m = 0, desp_m = 0, prod_m = 0;

  rr_finger #(.DATA_W(8)) dut (
    .clk(clk), .rst(rst), .en(en), .acc_rst(acc_rst), .pn(pn),
    .din(din), .coeff(coeff), .prod(prod)
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
    rst = 1'b1; en = 0; acc_rst = 0; pn = 0; din = 0; coeff = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      int pm;
      en      = ($urandom_range(0, 3) != 0);
      acc_rst = ($urandom_range(0, 15) == 0);
      pn      = 1'($urandom);
      din     = 8'($urandom);
      if (t % 50 == 0) coeff = 8'($urandom);
      pm = pn ? int'(din) : -int'(din);
      @(posedge clk);
      prod_m = desp_m * int'(coeff);
      if (acc_rst) begin
        desp_m = acc_m;
        acc_m  = en ? wrap8(pm) : 0;
        n_dump++;
      end else if (en) begin
        acc_m = wrap8(acc_m + pm);
      end
      @(negedge clk);
      checks++;
      if (int'(prod) != prod_m) begin
        failures++;
        $display("t=%0d prod=%0d expected %0d", t, prod, prod_m);
      end
    end
    checks++;
    if (n_dump == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
