// rr_finger: one finger of the RAKE receiver.
//
// A PN multiplier (two's complement plus multiplexer) despreads the finger's
// delayed copy of the received signal, an accumulator (carry-select adder and
// register) integrates it over one bit, and the coefficient multiplier
// weights the despread value with the finger's channel estimate for maximal
// ratio combining. The three parts are the document's; the integrate-and-dump
// register between accumulator and multiplier, and the registered multiplier
// output, are this design's way of letting one bit integrate while the
// previous one is weighted.
//
// Timing:
//   en      : accumulate pn*din this clock (DATA_W-bit, wrapping).
//   acc_rst : dump. The despread value of the finished bit moves to the dump
//             register, and the accumulator restarts with this clock's
//             product if en is also high (else 0).
//   prod    : dump register times coeff, registered every clock, so it shows
//             the finished bit two clocks after acc_rst.
module rr_finger #(
  parameter int DATA_W = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       en,
  input  logic                       acc_rst,
  input  logic                       pn,
  input  logic signed [DATA_W-1:0]   din,
  input  logic signed [DATA_W-1:0]   coeff,
  output logic signed [2*DATA_W-1:0] prod
);
  logic signed [DATA_W-1:0] pm, acc, despread;
  logic        [DATA_W-1:0] acc_sum;
  logic                     acc_co;

  pn_multiplier #(.DATA_W(DATA_W)) u_pnmult (.din(din), .pn(pn), .dout(pm));

  csla_bec #(.W(DATA_W)) u_add (
    .a(acc), .b(pm), .cin(1'b0), .sum(acc_sum), .cout(acc_co)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      acc      <= '0;
      despread <= '0;
      prod     <= '0;
    end else begin
      if (acc_rst) begin
        despread <= acc;
        acc      <= en ? pm : '0;
      end else if (en) begin
        acc <= signed'(acc_sum);
      end
      prod <= despread * coeff;
    end
  end
endmodule
