// synchronizer: arbiters on phase-shifted clocks that repair the coarse count.
//
// Two arbiters, each a coarse counter with its own fall edge detector and
// stored value, count the same Hit pulse on Clk1 and on Clk2, copies of the
// system clock Clk0 delayed by a fixed phase (1.25 ns and 2.5 ns at 200 MHz in
// this design). The decider then combines the primary stored count with the
// two arbiter counts and the fine start/stop values into a coarse count that
// agrees with the fine values (see decider.sv for the rule).
//
// Timing: an arbiter stores its count one of its own cycles after it sees
// Hit low, at the latest one Clk0 period plus its phase after the first Clk0
// edge that sees Hit low. The result is read in the Clk0 domain two Clk0
// edges after that edge, so the arbiter-to-Clk0 paths have (period - phase)
// to settle; the three clocks must come from one PLL.
//
// Interface: clk1, clk2, rst_n (asynchronous, active low), hit; c0 (primary
// stored count), fine_start, fine_stop; coarse and src (combinational).
`timescale 1ps/100fs
module synchronizer
#(
  parameter int COARSE_W  = tdc_pkg::COARSE_W,
  parameter int FINE_W    = tdc_pkg::FINE_W,
  parameter int CLK1_FINE = 209,
  parameter int CLK2_FINE = 140,
  parameter int GUARD     = 8
) (
  input  logic                clk1,
  input  logic                clk2,
  input  logic                rst_n,
  input  logic                hit,
  input  logic [COARSE_W-1:0] c0,
  input  logic [FINE_W-1:0]   fine_start,
  input  logic [FINE_W-1:0]   fine_stop,
  output logic [COARSE_W-1:0] coarse,
  output tdc_pkg::sync_src_e           src
);

  logic fall1, fall2;
  logic [COARSE_W-1:0] run1, run2;
  logic [COARSE_W-1:0] c1, c2;

  // Arbiters fall edge detector (one per phased clock)
  edge_detector u_fall1 (.clk(clk1), .rst_n, .hit, .rise(), .fall(fall1), .hit_sync());
  edge_detector u_fall2 (.clk(clk2), .rst_n, .hit, .rise(), .fall(fall2), .hit_sync());

  // Arbiter coarse counters with their stored values
  coarse_counter #(.COARSE_W(COARSE_W)) u_arb1 (
    .clk(clk1), .rst_n, .hit, .store(fall1), .count(run1), .stored(c1));
  coarse_counter #(.COARSE_W(COARSE_W)) u_arb2 (
    .clk(clk2), .rst_n, .hit, .store(fall2), .count(run2), .stored(c2));

  decider #(
    .COARSE_W(COARSE_W), .FINE_W(FINE_W),
    .CLK1_FINE(CLK1_FINE), .CLK2_FINE(CLK2_FINE), .GUARD(GUARD)
  ) u_decider (
    .c0, .c1, .c2, .fine_start, .fine_stop, .coarse, .src);

endmodule
