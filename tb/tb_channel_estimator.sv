// tb_channel_estimator: sends periodic pilot (the PN sequence repeated)
// through random 15-tap channels and checks, after one 15-chip window and a
// dump, that finger k holds 16 times the weight of the tap L-1-k chips after
// the first arrival. The window and chip phase are those of the packet plan:
// chips 29..43, PN chip (n - 14) mod 15.
module tb_channel_estimator;
  localparam int NC = 15, L = 15;
  logic              clk = 1'b0, rst, ce_en, ce_acc_rst, pn_ce;
  logic signed [7:0] signal_in;
  logic signed [7:0] coeff [L];
  logic [NC-1:0]     pn_code;
  int checks = 0, failures = 0;
  int h [L];

  channel_estimator #(.DATA_W(8), .L(L)) dut (
    .clk(clk), .rst(rst), .ce_en(ce_en), .ce_acc_rst(ce_acc_rst), .pn_ce(pn_ce),
    .signal_in(signal_in), .coeff(coeff)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] lfsr;
    lfsr = 4'b1001;
    for (int i = 0; i < NC; i++) begin
      pn_code[i] = lfsr[0];
      lfsr = {lfsr[0] ^ lfsr[1], lfsr[3:1]};
    end
    for (int trial = 0; trial < 8; trial++) begin
      for (int p = 0; p < L; p++) h[p] = int'($urandom_range(0, 14)) - 7;
      rst = 1'b1; ce_en = 0; ce_acc_rst = 0; pn_ce = 0; signal_in = 0;
      repeat (2) @(negedge clk);
      rst = 1'b0;
      for (int n = 0; n < 50; n++) begin
        int rv;
        rv = 0;
        for (int p = 0; p < L; p++)
          if (n - p >= 0) rv += h[p] * (pn_code[(n - p) % NC] ? 1 : -1);
        signal_in  = 8'(rv);
        pn_ce      = pn_code[(n + NC - (L - 1)) % NC];
        ce_en      = (n >= 29 && n <= 43);
        ce_acc_rst = (n == 44);
        @(negedge clk);
        if (n == 45) begin
          for (int k = 0; k < L; k++) begin
            checks++;
            if (int'(coeff[k]) != 16 * h[L - 1 - k]) begin
              failures++;
              $display("trial %0d coeff[%0d]=%0d expected %0d", trial, k, coeff[k], 16 * h[L - 1 - k]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
