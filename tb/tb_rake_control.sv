// tb_rake_control: checks the four strobes chip by chip against the packet
// plan (estimator window on chips 29..43, dump on chip 44, receiver from
// chip 59, bit ends every 15 chips from chip 74), with idle clocks (en low)
// before and inside the packet, and a second packet after a reset.
module tb_rake_control;
  localparam int NC = 15, NE = 3, L = 15;
  logic clk = 1'b0, rst, en;
  logic ce_en, ce_acc_rst, rr_en, rr_acc_rst;
  int checks = 0, failures = 0;
  int n_ce = 0, n_dump = 0, n_rr = 0, n_bits = 0;

  rake_control #(.NC(NC), .NE(NE), .L(L)) dut (
    .clk(clk), .rst(rst), .en(en), .ce_en(ce_en), .ce_acc_rst(ce_acc_rst),
    .rr_en(rr_en), .rr_acc_rst(rr_acc_rst)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pkt = 0; pkt < 2; pkt++) begin
      int n;
      rst = 1'b1; en = 1'b0;
      repeat (2) @(negedge clk);
      rst = 1'b0;
      n = 0;
      for (int t = 0; t < 250; t++) begin
        logic e_ce, e_dump, e_rr, e_bit;
        en = (t < 3) ? 1'b0 : ($urandom_range(0, 4) != 0);
        #1;
        e_ce   = en && n >= 29 && n <= 43;
        e_dump = en && n == 44;
        e_rr   = en && n >= 59;
        e_bit  = en && n >= 74 && (n - 59) % 15 == 0;
        checks++;
        if ({ce_en, ce_acc_rst, rr_en, rr_acc_rst} !== {e_ce, e_dump, e_rr, e_bit}) begin
          failures++;
          $display("chip %0d en %0d: got %b expected %b", n, en,
                   {ce_en, ce_acc_rst, rr_en, rr_acc_rst}, {e_ce, e_dump, e_rr, e_bit});
        end
        n_ce += ce_en; n_dump += ce_acc_rst; n_rr += rr_en; n_bits += rr_acc_rst;
        @(negedge clk);
        if (en) n++;
      end
    end
    checks++;
    if (n_ce != 30 || n_dump != 2) begin
      failures++;
      $display("estimator windows: %0d chips, %0d dumps", n_ce, n_dump);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
