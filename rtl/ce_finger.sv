// ce_finger: one finger of the sliding-window channel estimator.
//
// The finger correlates its delayed copy of the received signal with the
// local PN chip: a PN multiplier (two's complement plus multiplexer) feeds an
// accumulator made of a carry-select adder and a register. A second
// carry-select adder adds the window sum of the raw input (norm, from the
// estimator's shared input accumulator) to the correlation; the result goes
// to the output register, which holds the channel coefficient estimate.
//
// Why the second adder: with an m-sequence PN whose ones map to +1 the
// periodic autocorrelation is NC at lag 0 and -1 elsewhere, and the chips sum
// to +1. The raw correlation is therefore (NC+1)*h_j - sum(h), and the input
// window sum is exactly sum(h); adding it cancels the bias of every other
// path, leaving (NC+1)*h_j. That reading of the document's "normalize" adder
// is this design's own. All arithmetic is DATA_W-bit two's complement modulo
// 2^DATA_W, as in the document's 8-bit finger; intermediate wrap cancels, so
// the estimate is exact while |(NC+1)*h_j| < 2^(DATA_W-1).
//
// Timing (driven by the rake control):
//   en      : accumulate pn*din this clock.
//   acc_rst : dump and clear. coeff <= acc + norm, and the accumulator
//             restarts with this clock's product if en is also high (else 0).
//   coeff is valid the clock after acc_rst and held until the next dump.
module ce_finger #(
  parameter int DATA_W = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     acc_rst,
  input  logic                     pn,
  input  logic signed [DATA_W-1:0] din,
  input  logic signed [DATA_W-1:0] norm,
  output logic signed [DATA_W-1:0] coeff
);
  logic signed [DATA_W-1:0] prod, acc;
  logic        [DATA_W-1:0] acc_sum, est;
  logic                     acc_co, est_co;

  pn_multiplier #(.DATA_W(DATA_W)) u_pnmult (.din(din), .pn(pn), .dout(prod));

  csla_bec #(.W(DATA_W)) u_add (
    .a(acc), .b(prod), .cin(1'b0), .sum(acc_sum), .cout(acc_co)
  );

  csla_bec #(.W(DATA_W)) u_add2 (
    .a(acc), .b(norm), .cin(1'b0), .sum(est), .cout(est_co)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      coeff <= '0;
    end else if (acc_rst) begin
      coeff <= signed'(est);
      acc   <= en ? prod : '0;
    end else if (en) begin
      acc <= signed'(acc_sum);
    end
  end
endmodule
