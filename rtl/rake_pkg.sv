// rake_pkg: constants shared by the DS-UWB RAKE receiver subsystem.
//
// The sample width (8 bits) and the number of channel-estimator fingers (15)
// are the document's. The receiver runs at one chip per clock, so the number
// of fingers equals the number of chip-spaced multipath taps observed. The
// spreading length of 15 chips per bit, which makes a 15-chip m-sequence the
// natural PN code, is this design's reading of the 15-finger structure.
// The number of pilot bits (3) is this design's choice: it is the smallest
// count that gives the estimator a full, periodic 15-chip window after the
// 15-tap channel has filled.
package rake_pkg;
  localparam int DATA_W = 8;   // sample / coefficient width
  localparam int NC     = 15;  // chips per bit (PN length)
  localparam int L      = 15;  // channel-estimator fingers = taps
  localparam int NE     = 3;   // pilot bits per packet
  localparam int NRR    = 9;   // RAKE fingers built with HPS selection
  localparam int N_PAB  = 3;   // latest taps always dropped
  localparam int N_PAC  = 4;   // earliest taps always kept
  localparam int N_SEL  = 5;   // strongest taps picked among the rest
  localparam int IDX_W  = 4;   // width of a finger index
  localparam int PROD_W = 2 * DATA_W;  // coefficient product width
  localparam int EST_W  = PROD_W + 4;  // combined symbol width
endpackage
