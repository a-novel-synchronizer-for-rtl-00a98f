// tdc_pkg: constants and types shared by the Nutt TDC.
//
// The clock (200 MHz, 5 ns) and the tap delay (17.9 ps) are the measured
// operating point of the converter. The delay line is 280 taps long so that it
// covers one full clock period (5000 ps / 17.9 ps = 279.3 taps). The 32-bit
// result word holds three fields: a 14-bit coarse count and two 9-bit fine
// counts; the split of the 32 bits between the fields is a choice of this
// design (a 9-bit fine field is the smallest that holds 0..280).
`timescale 1ps/100fs
package tdc_pkg;

  localparam int TAPS        = 280;   // delay line taps (carry cells)
  localparam int FINE_W      = 9;     // width of a decoded fine value
  localparam int COARSE_W    = 14;    // width of the coarse count
  localparam int MEAS_W      = 32;    // merged measurement word
  localparam int PERIOD_TAPS = 279;   // taps per Clk0 period, 5000/17.9

  // Merged measurement: {coarse, fine_start, fine_stop}, MSB first.
  typedef struct packed {
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine_start;
    logic [FINE_W-1:0]   fine_stop;
  } tdc_meas_t;

  // Which coarse counter the decider trusted for a measurement.
  typedef enum logic [1:0] {
    SRC_CLK0 = 2'd0,   // primary counter, no edge near a Clk0 edge
    SRC_CLK1 = 2'd1,   // second counter (Clk1 arbiter)
    SRC_CLK2 = 2'd2    // third counter (Clk2 arbiter)
  } sync_src_e;

endpackage
