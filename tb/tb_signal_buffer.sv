// tb_signal_buffer: feeds random samples and checks that tap k shows the
// sample from k clocks earlier (zero before the stream began, after reset).
module tb_signal_buffer;
  localparam int L = 15;
  logic              clk = 1'b0, rst;
  logic signed [7:0] din;
  logic signed [7:0] taps [L];
  int checks = 0, failures = 0;
  int hist [$];

  signal_buffer #(.DATA_W(8), .L(L)) dut (.clk(clk), .rst(rst), .din(din), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; din = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      din = 8'($urandom);
      hist.push_front(int'(din));
      #1;
      for (int k = 0; k < L; k++) begin
        int expv;
        expv = (k < hist.size()) ? hist[k] : 0;
        checks++;
        if (int'(taps[k]) != expv) begin
          failures++;
          $display("t=%0d tap %0d = %0d expected %0d", t, k, taps[k], expv);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
