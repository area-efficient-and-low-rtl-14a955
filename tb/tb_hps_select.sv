// tb_hps_select: random estimate sets, including many equal magnitudes and
// the value -128, checked against a bench selection: taps 11..14 always,
// taps 0..2 never, and among taps 3..10 the five largest magnitudes with
// ties going to the higher tap. Also checks the output order and the
// one-clock registration. A directed case reproduces the selection example
// of the architecture description: fingers 1, 2, 3, 5, 6 and 10 (taps 0, 1,
// 2, 4, 5, 9) left out, the other nine used.
module tb_hps_select;
  localparam int L = 15, NOUT = 9;
  logic              clk = 1'b0, rst, en;
  logic signed [7:0] coeff [L];
  logic        [3:0] idx [NOUT];
  int checks = 0, failures = 0;

  hps_select dut (.clk(clk), .rst(rst), .en(en), .coeff(coeff), .idx(idx));

  always #5 clk = ~clk;

  function automatic int mag(int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    for (int k = 0; k < L; k++) coeff[k] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    en = 1'b1;
    for (int trial = 0; trial < 500; trial++) begin
      int exp_idx [NOUT];
      bit used [L];
      for (int k = 0; k < L; k++) begin
        case (trial % 3)
          0: coeff[k] = 8'($urandom);
          1: coeff[k] = 8'(int'($urandom_range(0, 6)) - 3);
          default: coeff[k] = ($urandom_range(0, 4) == 0) ? 8'h80 : 8'($urandom_range(0, 3) * 32);
        endcase
        used[k] = 0;
      end
      for (int i = 0; i < 4; i++) exp_idx[i] = L - 1 - i;
      for (int s = 0; s < 5; s++) begin
        int best;
        best = -1;
        for (int k = 3; k <= 10; k++)
          if (!used[k] && (best < 0 || mag(int'(coeff[k])) >= mag(int'(coeff[best]))))
            best = k;
        used[best] = 1;
        exp_idx[4 + s] = best;
      end
      @(negedge clk);
      for (int i = 0; i < NOUT; i++) begin
        checks++;
        if (int'(idx[i]) != exp_idx[i]) begin
          failures++;
          $display("trial %0d idx[%0d]=%0d expected %0d", trial, i, idx[i], exp_idx[i]);
        end
      end
    end
    // Directed example: strong middle taps 3, 6, 7, 8, 10; weak 4, 5, 9;
    // the dropped late taps 0..2 are strong but must still be left out.
    begin
      int ex_coeff [15] = '{100, -90, 80, -60, 5, -4, 50, -45, 40, 3, -35, 1, 0, -2, 2};
      bit used [L];
      for (int k = 0; k < L; k++) begin
        coeff[k] = 8'(ex_coeff[k]);
        used[k] = 0;
      end
      @(negedge clk);
      for (int i = 0; i < NOUT; i++) used[idx[i]] = 1;
      for (int k = 0; k < L; k++) begin
        bit want;
        want = !(k == 0 || k == 1 || k == 2 || k == 4 || k == 5 || k == 9);
        checks++;
        if (used[k] != want) begin
          failures++;
          $display("example: tap %0d used=%0d expected %0d", k, used[k], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
