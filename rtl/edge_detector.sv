// edge_detector: one-cycle rise and fall flags from the asynchronous Hit.
//
// Hit is sampled on every rising clock edge into hit_q, and hit_q into hit_qq.
// rise is high for the one cycle after the first clock edge that sees Hit
// high (hit_q & ~hit_qq); fall likewise after the first edge that sees it low.
// With the system clock this drives the start and stop thermometer registers
// and the coarse counter's store; with the phase-shifted clocks Clk1 and Clk2
// the same block is the arbiters' fall edge detector.
//
// A minimum of one clock period of Hit high and of Hit low is needed for each
// level to be seen by at least one clock edge. The two-flop structure is this
// design's choice; the flags' timing (one cycle long, raised after the
// sampling edge) follows the start/stop timing diagram of the converter.
//
// Interface: clk, rst_n (asynchronous, active low), hit; rise, fall, and the
// synchronised level hit_sync (= hit_q).
`timescale 1ps/100fs
module edge_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic hit,
  output logic rise,
  output logic fall,
  output logic hit_sync
);

  logic hit_q, hit_qq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_q  <= 1'b0;
      hit_qq <= 1'b0;
    end else begin
      hit_q  <= hit;
      hit_qq <= hit_q;
    end
  end

  assign rise     = hit_q & ~hit_qq;
  assign fall     = ~hit_q & hit_qq;
  assign hit_sync = hit_q;

  // The two flags are mutually exclusive by construction.
  assert property (@(posedge clk) !(rise && fall));

endmodule
