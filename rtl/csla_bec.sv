// csla_bec: modified square-root carry-select adder using Binary to
// Excess-1 Converters (BEC) in place of the carry-in-1 ripple adders.
//
// The operands are cut into groups of 2, 2, 3, 4, 5, ... bits from the LSB
// (five groups for 16 bits, as in the document's 16-bit adder). The first
// group is a plain ripple-carry adder fed by cin. Every later group of n bits
// has one n-bit ripple-carry adder computing {carry, sum} for a carry-in of
// 0, and an (n+1)-bit BEC that adds one to that result, giving the carry-in-1
// answer without a second adder. A 2(n+1):(n+1) multiplexer driven by the
// carry out of the group below picks one. When W is not the sum of whole
// groups, the last group is shortened to fit (this design's choice; the
// document describes only the 16-bit case).
//
// Interface: sum/cout = a + b + cin, unsigned W-bit arithmetic (which is also
// two's-complement addition modulo 2^W). Purely combinational.
module csla_bec #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  // Nominal width of group g: 2, 2, 3, 4, 5, ...
  function automatic int group_size(int g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  function automatic int group_start(int g);
    int s = 0;
    for (int i = 0; i < g; i++) s += group_size(i);
    return s;
  endfunction

  function automatic int group_count(int w);
    int s = 0;
    int g = 0;
    while (s < w) begin
      s += group_size(g);
      g++;
    end
    return g;
  endfunction

  function automatic int group_width(int g, int w);
    int rest = w - group_start(g);
    return (group_size(g) < rest) ? group_size(g) : rest;
  endfunction

  localparam int NG = group_count(W);

  logic [NG:0] gcarry;  // carry into group g
  assign gcarry[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int S = group_start(g);
    localparam int N = group_width(g, W);
    if (g == 0) begin : g_first
      rca #(.W(N)) u_rca (
        .a(a[S +: N]), .b(b[S +: N]), .cin(gcarry[0]),
        .sum(sum[S +: N]), .cout(gcarry[1])
      );
    end else begin : g_sel
      logic [N-1:0] s0;
      logic         c0;
      logic [N:0]   r1;  // {carry, sum} for carry-in 1
      rca #(.W(N)) u_rca (
        .a(a[S +: N]), .b(b[S +: N]), .cin(1'b0),
        .sum(s0), .cout(c0)
      );
      bec #(.W(N + 1)) u_bec (.b({c0, s0}), .x(r1));
      assign {gcarry[g+1], sum[S +: N]} = gcarry[g] ? r1 : {c0, s0};
    end
  end

  assign cout = gcarry[NG];
endmodule
