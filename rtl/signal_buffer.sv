// signal_buffer: tapped delay line of L-1 z^-1 registers.
//
// taps[0] is the input itself and taps[k] the input k clocks ago, so finger
// k of the estimator or receiver sees the received samples delayed by k
// chips. The clock runs at the chip rate and the line shifts on every clock,
// as the buffers in the estimator and receiver have no enable of their own.
// The registers clear on the synchronous reset.
module signal_buffer #(
  parameter int DATA_W = 8,
  parameter int L      = 15
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DATA_W-1:0] taps [L]
);
  logic signed [DATA_W-1:0] dly [1:L-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 1; k < L; k++) dly[k] <= '0;
    end else begin
      dly[1] <= din;
      for (int k = 2; k < L; k++) dly[k] <= dly[k-1];
    end
  end

  always_comb begin
    taps[0] = din;
    for (int k = 1; k < L; k++) taps[k] = dly[k];
  end
endmodule
