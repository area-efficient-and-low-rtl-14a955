// tb_rake_receiver: random received samples, chips, coefficients and finger
// indices (repeated and out-of-order indices included) into the 9-finger
// receiver; every combined symbol is compared with a bench model of the
// index multiplexers, 8-bit despreading and weighted sum, and est_valid must
// come exactly three clocks after each bit end.
module tb_rake_receiver;
  localparam int L = 15, NRR = 9, NC = 15;
  logic               clk = 1'b0, rst, rr_en, rr_acc_rst, pn_rr;
  logic signed [7:0]  signal_in;
  logic signed [7:0]  coeff [L];
  logic        [3:0]  idx [NRR];
  logic signed [19:0] est_symbol;
  logic               est_valid;
  int checks = 0, failures = 0, n_sym = 0;

  rake_receiver dut (
    .clk(clk), .rst(rst), .rr_en(rr_en), .rr_acc_rst(rr_acc_rst), .pn_rr(pn_rr),
    .signal_in(signal_in), .coeff(coeff), .idx(idx),
    .est_symbol(est_symbol), .est_valid(est_valid)
  );

  always #5 clk = ~clk;

  function automatic int wrap8(int v);
    return int'(signed'(8'(v)));
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist [$];     // received samples, newest first
    int acc [NRR];
    int expq [$];     // expected symbols in order
    int due [$];      // clock on which each is due
    rst = 1'b1; rr_en = 0; rr_acc_rst = 0; pn_rr = 0; signal_in = 0;
    for (int k = 0; k < L; k++) coeff[k] = 8'($urandom);
    for (int i = 0; i < NRR; i++) idx[i] = 4'($urandom_range(0, L - 1));
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < NRR; i++) acc[i] = 0;
    for (int t = 0; t < 20 * L; t++) hist.push_front(0);
    for (int t = 0; t < 1500; t++) begin
      int pm;
      // Change selection and coefficients only between bits.
      if (t % 300 == 0) begin
        for (int k = 0; k < L; k++) coeff[k] = 8'($urandom);
        for (int i = 0; i < NRR; i++) idx[i] = 4'($urandom_range(0, L - 1));
      end
      signal_in  = 8'($urandom);
      pn_rr      = 1'($urandom);
      rr_en      = 1'b1;
      rr_acc_rst = (t % NC == 0) && t > 0;
      hist.push_front(int'(signal_in));
      if (rr_acc_rst) begin
        int e;
        e = 0;
        for (int i = 0; i < NRR; i++) e += acc[i] * int'(coeff[idx[i]]);
        expq.push_back(e);
        due.push_back(t + 3);
        for (int i = 0; i < NRR; i++) acc[i] = 0;
      end
      for (int i = 0; i < NRR; i++) begin
        pm = pn_rr ? hist[idx[i]] : -hist[idx[i]];
        acc[i] = wrap8(acc[i] + pm);
      end
      // Outputs of this clock.
      if (est_valid) begin
        n_sym++;
        checks++;
        if (expq.size() == 0 || due[0] != t) begin
          failures++;
          $display("t=%0d unexpected est_valid", t);
        end else begin
          checks++;
          if (int'(est_symbol) != expq[0]) begin
            failures++;
            $display("t=%0d est_symbol=%0d expected %0d", t, est_symbol, expq[0]);
          end
          void'(expq.pop_front());
          void'(due.pop_front());
        end
      end else if (due.size() > 0 && due[0] == t) begin
        checks++;
        failures++;
        $display("t=%0d est_valid missing", t);
        void'(expq.pop_front());
        void'(due.pop_front());
      end
      @(negedge clk);
    end
    checks++;
    if (n_sym < 90) begin
      failures++;
      $display("only %0d symbols", n_sym);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
