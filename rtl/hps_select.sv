// hps_select: hybrid partial/selective (HPS) finger selection.
//
// The channel estimates arrive ordered by tap: coeff[k] belongs to the path
// arriving L-1-k chips after the first, so the highest indices are the
// earliest paths. Because the power delay profile decays, the N_PAC earliest
// taps are always kept (partially accepted) and the N_PAB latest are always
// dropped (partially aborted) without comparison. Only the remaining
// L-N_PAC-N_PAB candidates (8 by default) are ranked by magnitude, with a
// bubble sort cut short after N_SEL passes: each pass moves the strongest of
// the unsorted candidates to the top, so N_SEL passes (5 instead of 8) leave
// the N_SEL strongest there (selectively accepted); the rest are selectively
// aborted. The loop unrolls into a network of comparators and multiplexers.
// Ties go to the later index (the earlier path), which the sort's stability
// gives for free. Strength is |coeff|; the document says only "strongest".
//
// idx[0 .. N_PAC-1] are the partially accepted taps (earliest path first),
// idx[N_PAC ..] the selected ones, strongest first. The list is registered
// while en is high, so it is valid one clock after coeff settles.
module hps_select #(
  parameter int DATA_W = 8,
  parameter int L      = 15,
  parameter int N_PAB  = 3,
  parameter int N_PAC  = 4,
  parameter int N_SEL  = 5,
  parameter int IDX_W  = 4,
  parameter int NOUT   = N_PAC + N_SEL
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] coeff [L],
  output logic        [IDX_W-1:0]  idx [NOUT]
);
  localparam int NCAND = L - N_PAC - N_PAB;

  typedef struct packed {
    logic [DATA_W-1:0] mag;
    logic [IDX_W-1:0]  tap;
  } cand_t;

  cand_t                cand [NCAND];
  logic [IDX_W-1:0]     idx_next [NOUT];

  always_comb begin
    cand_t tmp;
    tmp = '0;
    for (int i = 0; i < NOUT; i++) idx_next[i] = '0;
    for (int j = 0; j < NCAND; j++) begin
      cand[j].tap = IDX_W'(N_PAB + j);
      cand[j].mag = coeff[N_PAB + j][DATA_W-1] ? DATA_W'(-coeff[N_PAB + j])
                                               : DATA_W'(coeff[N_PAB + j]);
    end
    // Partial bubble sort: N_SEL passes, each bubbling the largest upward.
    for (int p = 0; p < N_SEL; p++) begin
      for (int j = 0; j < NCAND - 1 - p; j++) begin
        if (cand[j].mag > cand[j+1].mag) begin
          tmp       = cand[j];
          cand[j]   = cand[j+1];
          cand[j+1] = tmp;
        end
      end
    end
    for (int i = 0; i < N_PAC; i++) idx_next[i] = IDX_W'(L - 1 - i);
    for (int i = 0; i < N_SEL; i++) idx_next[N_PAC + i] = cand[NCAND - 1 - i].tap;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NOUT; i++) idx[i] <= IDX_W'(L - 1 - i);
    end else if (en) begin
      idx <= idx_next;
    end
  end
endmodule
