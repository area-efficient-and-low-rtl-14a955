// tb_pn_buffer: loads a random code during reset, then checks that the n-th
// enabled clock shows chip (n - 14) mod 15 on both outputs and that clocks
// with en low hold the chip.
module tb_pn_buffer;
  localparam int NC = 15, L = 15;
  logic          clk = 1'b0, rst, en;
  logic [NC-1:0] pn_code;
  logic          pn_ce, pn_rr;
  int checks = 0, failures = 0;

  pn_buffer #(.NC(NC), .L(L)) dut (
    .clk(clk), .rst(rst), .en(en), .pn_code(pn_code), .pn_ce(pn_ce), .pn_rr(pn_rr)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int rep = 0; rep < 3; rep++) begin
      pn_code = NC'($urandom);
      rst = 1'b1; en = 1'b0;
      repeat (2) @(negedge clk);
      rst = 1'b0;
      n = 0;
      for (int t = 0; t < 100; t++) begin
        logic expv;
        en = ($urandom_range(0, 3) != 0);
        expv = pn_code[(n - (L - 1) + 10 * NC) % NC];
        checks++;
        if (pn_ce !== expv || pn_rr !== expv) begin
          failures++;
          $display("chip %0d: pn_ce=%0d pn_rr=%0d expected %0d", n, pn_ce, pn_rr, expv);
        end
        @(negedge clk);
        if (en) n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
