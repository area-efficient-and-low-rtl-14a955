// rake_control: sequencing of the channel estimator and RAKE receiver.
//
// A packet starts with NE pilot bits (each the plain PN sequence) followed by
// data bits, and the first clock with en high after reset carries chip 0 of
// the packet at the subsystem input. en must then stay high for the rest of
// the packet: the signal buffers shift on every clock, and clearing en only
// freezes the control and the PN phase. Chips are counted from that point.
//
// The estimator needs one full bit period (NC chips) in which every tap of
// its signal buffer (delays 0 .. L-1) sees the periodic pilot, so the window
// opens at chip CE_START = NC*(NE-2) + L-1 and closes NC chips later, with
// the PN phase aligned to the tap of largest delay. One clock after the
// window the estimator is dumped (ce_acc_rst). The receiver windows are the
// data bits as seen by the same tap: the first opens at chip
// RR_START = NC*NE + L-1, and every NC chips after it rr_acc_rst ends one bit
// and starts the next. rr_en then stays high until the next reset.
// The document says only that this block synchronizes the two subsystems and
// times their operation; the window positions are derived here.
//
// Outputs are combinational from the chip count and en.
module rake_control #(
  parameter int NC = 15,
  parameter int NE = 3,
  parameter int L  = 15
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic ce_en,
  output logic ce_acc_rst,
  output logic rr_en,
  output logic rr_acc_rst
);
  localparam int CE_START = NC * (NE - 2) + L - 1;
  localparam int CE_DUMP  = CE_START + NC;
  localparam int RR_START = NC * NE + L - 1;
  localparam int CNT_W    = $clog2(RR_START + 1);
  localparam int PH_W     = $clog2(NC + 1);

  typedef enum logic [1:0] {
    S_PILOT,   // counting chips towards and through the estimator window
    S_DATA     // receiver running, one bit every NC chips
  } state_t;

  state_t           state;
  logic [CNT_W-1:0] chip_cnt;   // chips since packet start (S_PILOT)
  logic [PH_W-1:0]  chip_ph;    // chip within the current bit (S_DATA)
  logic             first_bit;  // no bit finished yet

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_PILOT;
      chip_cnt  <= '0;
      chip_ph   <= '0;
      first_bit <= 1'b1;
    end else if (en) begin
      unique case (state)
        S_PILOT: begin
          if (chip_cnt == CNT_W'(RR_START - 1)) begin
            state   <= S_DATA;
            chip_ph <= '0;
          end
          chip_cnt <= chip_cnt + 1'b1;
        end
        S_DATA: begin
          if (chip_ph == PH_W'(NC - 1)) begin
            chip_ph   <= '0;
            first_bit <= 1'b0;
          end else begin
            chip_ph <= chip_ph + 1'b1;
          end
        end
        default: state <= S_PILOT;
      endcase
    end
  end

  always_comb begin
    ce_en      = en && state == S_PILOT &&
                 chip_cnt >= CNT_W'(CE_START) && chip_cnt < CNT_W'(CE_DUMP);
    ce_acc_rst = en && state == S_PILOT && chip_cnt == CNT_W'(CE_DUMP);
    rr_en      = en && state == S_DATA;
    rr_acc_rst = en && state == S_DATA && chip_ph == '0 && !first_bit;
  end

  // The estimator window must fit inside the pilot and be dumped before the
  // receiver starts.
  initial begin
    assert (NE >= 2 && NC * (NE - 2) >= L - 1 && L - 1 <= NC)
      else $error("rake_control: NE=%0d pilot bits too few for L=%0d taps", NE, L);
  end
endmodule
