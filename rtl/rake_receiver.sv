// rake_receiver: RAKE receiver with hybrid partial/selective finger
// assignment and maximal ratio combining.
//
// The received chips run through a signal buffer of L-1 z^-1 registers.
// Only NRR fingers are built (9 of the 15 taps, as in the document's HPS
// configuration). For each finger i a pair of L:1 multiplexers, driven by the
// index idx[i] from the selection subsystem, picks the buffer tap and the
// matching channel estimate. The finger products are summed by a chain of
// carry-select adders into the combined symbol estimate. Setting NRR = L and
// idx[i] = i gives the full RAKE with every finger.
//
// Timing: rr_en accumulates one chip; rr_acc_rst ends a bit. est_symbol is
// registered and updated with est_valid high three clocks after rr_acc_rst
// (dump register, product register, sum register). idx and coeff must stay
// constant over a bit.
module rake_receiver #(
  parameter int DATA_W = 8,
  parameter int L      = 15,
  parameter int NRR    = 9,
  parameter int IDX_W  = 4,
  parameter int EST_W  = 2 * DATA_W + 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     rr_en,
  input  logic                     rr_acc_rst,
  input  logic                     pn_rr,
  input  logic signed [DATA_W-1:0] signal_in,
  input  logic signed [DATA_W-1:0] coeff [L],
  input  logic        [IDX_W-1:0]  idx [NRR],
  output logic signed [EST_W-1:0]  est_symbol,
  output logic                     est_valid
);
  localparam int PROD_W = 2 * DATA_W;

  logic signed [DATA_W-1:0] taps [L];
  logic signed [PROD_W-1:0] prod [NRR];
  logic        [EST_W-1:0]  partial [NRR+1];
  logic        [2:0]        valid_pipe;

  signal_buffer #(.DATA_W(DATA_W), .L(L)) u_sigbuf (
    .clk(clk), .rst(rst), .din(signal_in), .taps(taps)
  );

  assign partial[0] = '0;

  for (genvar i = 0; i < NRR; i++) begin : g_finger
    logic signed [DATA_W-1:0] sel_sig, sel_coeff;
    logic                     co;

    // Index-driven multiplexers; an index past the last tap selects nothing.
    always_comb begin
      if (int'(idx[i]) < L) begin
        sel_sig   = taps[idx[i]];
        sel_coeff = coeff[idx[i]];
      end else begin
        sel_sig   = '0;
        sel_coeff = '0;
      end
    end

    rr_finger #(.DATA_W(DATA_W)) u_finger (
      .clk(clk), .rst(rst), .en(rr_en), .acc_rst(rr_acc_rst), .pn(pn_rr),
      .din(sel_sig), .coeff(sel_coeff), .prod(prod[i])
    );

    csla_bec #(.W(EST_W)) u_comb (
      .a(partial[i]), .b(EST_W'(prod[i])), .cin(1'b0),
      .sum(partial[i+1]), .cout(co)
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      est_symbol <= '0;
      valid_pipe <= '0;
    end else begin
      est_symbol <= signed'(partial[NRR]);
      valid_pipe <= {valid_pipe[1:0], rr_acc_rst};
    end
  end

  assign est_valid = valid_pipe[2];
endmodule
