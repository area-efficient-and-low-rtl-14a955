// rake_top: DS-UWB chip-spaced RAKE receiver subsystem.
//
// Chip-rate samples of the pulse-matched-filter output enter at signal_in,
// one per clock. The packet opens with NE pilot bits, each the PN sequence
// itself. The channel estimator (CE) correlates the pilot against the PN
// code from the PN buffer and produces L = 15 chip-spaced channel
// coefficient estimates. The hybrid partial/selective subsystem (HPSS)
// keeps the 4 earliest taps, drops the 3 latest, and picks the 5 strongest of
// the remaining 8. The RAKE receiver (RR) then despreads each data bit on
// those 9 taps and combines them by maximal ratio into est_symbol, whose
// sign is the BPSK decision. The rake control (RC) times the CE window and
// the RR bit windows. The five blocks and their connections follow the
// document's top-level diagram. est_valid, and the coeff and idx outputs that
// let one watch the estimates and the selection, are additions.
//
// Interface: rst (synchronous) starts a packet and loads pn_code (bit i =
// chip i, 1 meaning +1). The first clock with en high carries chip 0; en must
// stay high for the whole packet. Bit i of the data gives est_valid at chip
// NC*NE + L-1 + NC*(i+1) + 3 counted from chip 0.
module rake_top
  import rake_pkg::*;
#(
  parameter int DATA_W_P = DATA_W,
  parameter int NC_P     = NC,
  parameter int NE_P     = NE,
  parameter int L_P      = L,
  parameter int N_PAB_P  = N_PAB,
  parameter int N_PAC_P  = N_PAC,
  parameter int N_SEL_P  = N_SEL,
  parameter int IDX_W_P  = IDX_W,
  parameter int NRR_P    = NRR,
  parameter int EST_W_P  = EST_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       en,
  input  logic [NC_P-1:0]            pn_code,
  input  logic signed [DATA_W_P-1:0] signal_in,
  output logic signed [EST_W_P-1:0]  est_symbol,
  output logic                       est_valid,
  output logic signed [DATA_W_P-1:0] coeff [L_P],
  output logic        [IDX_W_P-1:0]  idx [NRR_P]
);
  logic pn_ce, pn_rr;
  logic ce_en, ce_acc_rst, rr_en, rr_acc_rst;

  pn_buffer #(.NC(NC_P), .L(L_P)) u_pn_buffer (
    .clk(clk), .rst(rst), .en(en), .pn_code(pn_code),
    .pn_ce(pn_ce), .pn_rr(pn_rr)
  );

  rake_control #(.NC(NC_P), .NE(NE_P), .L(L_P)) u_rake_control (
    .clk(clk), .rst(rst), .en(en),
    .ce_en(ce_en), .ce_acc_rst(ce_acc_rst),
    .rr_en(rr_en), .rr_acc_rst(rr_acc_rst)
  );

  channel_estimator #(.DATA_W(DATA_W_P), .L(L_P)) u_channel_estimator (
    .clk(clk), .rst(rst), .ce_en(ce_en), .ce_acc_rst(ce_acc_rst),
    .pn_ce(pn_ce), .signal_in(signal_in), .coeff(coeff)
  );

  hps_select #(
    .DATA_W(DATA_W_P), .L(L_P), .N_PAB(N_PAB_P), .N_PAC(N_PAC_P),
    .N_SEL(N_SEL_P), .IDX_W(IDX_W_P), .NOUT(NRR_P)
  ) u_hps_select (
    .clk(clk), .rst(rst), .en(en), .coeff(coeff), .idx(idx)
  );

  rake_receiver #(
    .DATA_W(DATA_W_P), .L(L_P), .NRR(NRR_P), .IDX_W(IDX_W_P), .EST_W(EST_W_P)
  ) u_rake_receiver (
    .clk(clk), .rst(rst), .rr_en(rr_en), .rr_acc_rst(rr_acc_rst),
    .pn_rr(pn_rr), .signal_in(signal_in), .coeff(coeff), .idx(idx),
    .est_symbol(est_symbol), .est_valid(est_valid)
  );

  // The receiver has one finger per kept tap.
  initial begin
    assert (NRR_P == N_PAC_P + N_SEL_P && N_PAB_P + N_PAC_P + N_SEL_P <= L_P)
      else $error("rake_top: NRR_P=%0d does not match the selection", NRR_P);
  end
endmodule
