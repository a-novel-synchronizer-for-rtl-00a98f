// decider: picks a coarse count that agrees with the fine values.
//
// The primary counter (Clk0) can be off by one when the rising or falling
// edge of Hit lands close to a Clk0 edge: the counter may or may not count
// that edge, while the delay line then holds a fine value close to 0 (or, if
// the edge was taken one cycle later, close to a full period). Two more
// counters on clocks Clk1 and Clk2, delayed copies of Clk0, arbitrate.
//
// An edge at time t gives fine value F = (next Clk0 edge - t) / cell delay.
// An edge that coincides with a Clk1 edge therefore gives F = CLK1_FINE
// (= (T - phase1) / cell delay), and likewise CLK2_FINE for Clk2. Counting
// Clk1 edges instead of Clk0 edges changes the count by one for each edge of
// Hit that falls between a Clk0 edge and the following Clk1 edge, which is
// exactly when its fine value is at least CLK1_FINE. So
//   coarse = c1 + (fine_stop >= CLK1_FINE) - (fine_start >= CLK1_FINE),
// and the same with c2 and CLK2_FINE. The decider uses
//   - c0 when neither edge is within GUARD taps of a Clk0 edge
//     (scenario Hit2 of the timing diagram),
//   - the corrected c1 when one is, unless an edge is also near a Clk1 edge,
//   - the corrected c2 otherwise (one edge near Clk0, the other near Clk1).
// Since the three clock edges are more than 2*GUARD taps apart, at most two
// of the three counters are doubtful for any pulse and the chosen one never
// is. The use of the second counter, of the third when the other edge falls
// between the phased clocks, and of a +1 correction from comparing the fine
// value with the clock phase difference follow the document; the general
// closed form above, the guard band and the phase values are this design's.
//
// Interface: combinational. c0/c1/c2 are the stored counts of the three
// counters for the same pulse, fine_start/fine_stop its decoded fine values;
// coarse is the corrected Clk0 count, src tells which counter was used.
`timescale 1ps/100fs
module decider
#(
  parameter int COARSE_W    = tdc_pkg::COARSE_W,
  parameter int FINE_W      = tdc_pkg::FINE_W,
  parameter int PERIOD_TAPS = tdc_pkg::PERIOD_TAPS,
  parameter int CLK1_FINE   = 209,   // (5000 ps - 1250 ps) / 17.9 ps
  parameter int CLK2_FINE   = 140,   // (5000 ps - 2500 ps) / 17.9 ps
  parameter int GUARD       = 8      // taps, about 143 ps each side
) (
  input  logic [COARSE_W-1:0] c0,
  input  logic [COARSE_W-1:0] c1,
  input  logic [COARSE_W-1:0] c2,
  input  logic [FINE_W-1:0]   fine_start,
  input  logic [FINE_W-1:0]   fine_stop,
  output logic [COARSE_W-1:0] coarse,
  output tdc_pkg::sync_src_e           src
);

  function automatic logic near_clk0(input logic [FINE_W-1:0] f);
    return (int'(f) < GUARD) || (int'(f) > PERIOD_TAPS - GUARD);
  endfunction

  function automatic logic near_tap(input logic [FINE_W-1:0] f, input int p);
    return (int'(f) > p - GUARD) && (int'(f) < p + GUARD);
  endfunction

  logic [COARSE_W-1:0] c1_fixed, c2_fixed;

  always_comb begin
    c1_fixed = c1 + COARSE_W'(int'(fine_stop) >= CLK1_FINE)
                  - COARSE_W'(int'(fine_start) >= CLK1_FINE);
    c2_fixed = c2 + COARSE_W'(int'(fine_stop) >= CLK2_FINE)
                  - COARSE_W'(int'(fine_start) >= CLK2_FINE);

    if (!near_clk0(fine_start) && !near_clk0(fine_stop)) begin
      coarse = c0;
      src    = tdc_pkg::SRC_CLK0;
    end else if (!near_tap(fine_start, CLK1_FINE) && !near_tap(fine_stop, CLK1_FINE)) begin
      coarse = c1_fixed;
      src    = tdc_pkg::SRC_CLK1;
    end else begin
      coarse = c2_fixed;
      src    = tdc_pkg::SRC_CLK2;
    end
  end

endmodule
