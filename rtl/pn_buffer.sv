// pn_buffer: holds the PN spreading sequence and plays it out chip by chip.
//
// The NC-chip code (bit i = chip i, 1 meaning +1) is loaded from pn_code
// while rst is high into a circular shift register, which rotates one place
// on every clock with en high; bit 0 is the current chip. The code is loaded
// already rotated so that on the n-th enabled clock of a packet the output
// is chip (n - (L-1)) mod NC: the PN phase that lines up with the tap of
// largest delay (L-1 chips) in the signal buffers. That is the alignment the
// estimator and receiver windows use (see rake_control). pn_ce and pn_rr are
// the same chip, because both windows start on a bit boundary of that tap.
// The parallel load port is this design's choice; the document gives only
// the port name pn_code.
module pn_buffer #(
  parameter int NC = 15,
  parameter int L  = 15
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [NC-1:0] pn_code,
  output logic          pn_ce,
  output logic          pn_rr
);
  localparam int OFFSET = (NC - ((L - 1) % NC)) % NC;

  logic [NC-1:0] code_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NC; i++) code_q[i] <= pn_code[(i + OFFSET) % NC];
    end else if (en) begin
      code_q <= {code_q[0], code_q[NC-1:1]};
    end
  end

  assign pn_ce = code_q[0];
  assign pn_rr = code_q[0];
endmodule
