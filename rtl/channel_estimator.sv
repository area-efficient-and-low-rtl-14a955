// channel_estimator: data-aided sliding-window channel estimator.
//
// The received chips pass through a signal buffer of L-1 z^-1 registers;
// finger k (k = 0 .. L-1) correlates the signal delayed by k chips with the
// PN chip pn_ce over one bit period of pilot. One shared accumulator (the
// sum block in front of the fingers) adds up the raw input over the same
// window and supplies each finger's normalising adder. With the PN aligned
// to the tap of largest delay, finger k estimates the path that arrives
// L-1-k chips after the first one, so finger L-1 holds the first arrival and
// finger 0 the latest. Each estimate is (NC+1) times the tap weight (see
// ce_finger).
//
// Structure (signal buffer, input sum, 15 identical fingers) follows the
// document. Timing: ce_en accumulates one chip; ce_acc_rst dumps all
// fingers into coeff (valid the next clock) and clears the accumulators.
module channel_estimator #(
  parameter int DATA_W = 8,
  parameter int L      = 15
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ce_en,
  input  logic                     ce_acc_rst,
  input  logic                     pn_ce,
  input  logic signed [DATA_W-1:0] signal_in,
  output logic signed [DATA_W-1:0] coeff [L]
);
  logic signed [DATA_W-1:0] taps [L];
  logic signed [DATA_W-1:0] sig_acc;
  logic        [DATA_W-1:0] sig_sum;
  logic                     sig_co;

  signal_buffer #(.DATA_W(DATA_W), .L(L)) u_sigbuf (
    .clk(clk), .rst(rst), .din(signal_in), .taps(taps)
  );

  // Input accumulator (the sum block feeding every finger's second adder).
  csla_bec #(.W(DATA_W)) u_sig_add (
    .a(sig_acc), .b(signal_in), .cin(1'b0), .sum(sig_sum), .cout(sig_co)
  );

  always_ff @(posedge clk) begin
    if (rst)             sig_acc <= '0;
    else if (ce_acc_rst) sig_acc <= ce_en ? signal_in : '0;
    else if (ce_en)      sig_acc <= signed'(sig_sum);
  end

  for (genvar k = 0; k < L; k++) begin : g_finger
    ce_finger #(.DATA_W(DATA_W)) u_finger (
      .clk(clk), .rst(rst), .en(ce_en), .acc_rst(ce_acc_rst), .pn(pn_ce),
      .din(taps[k]), .norm(sig_acc), .coeff(coeff[k])
    );
  end
endmodule
