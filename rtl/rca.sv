// rca: W-bit ripple-carry adder built from full-adder cells.
//
// Used by the carry-select adder as the carry-in-0 path of every group and
// as the whole first group. Purely combinational.
module rca #(
  parameter int W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  always_comb begin
    logic c;  // carry into bit i
    c = cin;
    for (int i = 0; i < W; i++) begin
      sum[i] = a[i] ^ b[i] ^ c;
      c      = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    cout = c;
  end
endmodule
