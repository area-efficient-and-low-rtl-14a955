// bec: W-bit Binary to Excess-1 Converter, x = b + 1 (mod 2^W).
//
// Bit 0 is inverted; every higher bit i is XORed with the AND of all bits
// below it, exactly the Boolean form X_N = B_N ^ (B_0 & ... & B_N-1) and the
// chained AND/XOR structure of the 4-bit converter the design is built on.
// The AND terms are chained (one AND gate per bit) as drawn for the 4-bit
// case. Purely combinational; W is a parameter so the carry-select adder can
// use 2- to 7-bit converters.
module bec #(
  parameter int W = 4
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);
  always_comb begin
    logic all_ones_below;  // AND of b[0..i-1]
    all_ones_below = 1'b1;
    for (int i = 0; i < W; i++) begin
      x[i]           = b[i] ^ all_ones_below;
      all_ones_below = all_ones_below & b[i];
    end
  end
endmodule
