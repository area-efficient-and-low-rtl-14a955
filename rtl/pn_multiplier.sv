// pn_multiplier: multiplies a signed sample by a PN chip of +1 or -1.
//
// As in the estimator and receiver fingers of the document, no multiplier
// is used: a two's-complement unit produces -din and a 2:1 multiplexer picks
// din (chip bit 1, meaning +1) or -din (chip bit 0, meaning -1). The mapping
// of chip bit to sign is this design's choice. The two's complement is formed
// as ~din + 1 with a Binary to Excess-1 Converter, so it needs no adder.
// -(-2^(W-1)) wraps to itself, as in any W-bit two's-complement negation.
// Purely combinational.
module pn_multiplier #(
  parameter int DATA_W = 8
) (
  input  logic signed [DATA_W-1:0] din,
  input  logic                     pn,
  output logic signed [DATA_W-1:0] dout
);
  logic [DATA_W-1:0] neg;

  bec #(.W(DATA_W)) u_twoscomp (.b(~din), .x(neg));

  assign dout = pn ? din : signed'(neg);
endmodule
