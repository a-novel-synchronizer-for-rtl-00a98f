// coarse_counter: counts clock cycles while Hit is high and stores the count.
//
// The counter's enable is the asynchronous Hit itself, so it adds one at every
// rising clock edge that sees Hit high. When the edge detector of the same
// clock raises its one-cycle fall flag (store), the count is copied into the
// stored value and the counter restarts, at 1 if Hit is already high again so
// that a new pulse one cycle after the last is still counted (one cycle of
// dead time). The stored value of a pulse therefore equals the number of
// clock edges between the first edge that saw Hit high and the first edge
// that saw it low.
//
// The primary counter runs on Clk0; the synchronizer's two arbiters are the
// same block on Clk1 and Clk2. Counting on Hit and storing on the fall flag
// follow the document; restart-on-store is this design's choice.
//
// Interface: clk, rst_n (asynchronous, active low), hit, store (fall flag of
// this clock domain); count (running), stored (valid from the cycle after
// store until the next store).
`timescale 1ps/100fs
module coarse_counter #(
  parameter int COARSE_W = tdc_pkg::COARSE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                hit,
  input  logic                store,
  output logic [COARSE_W-1:0] count,
  output logic [COARSE_W-1:0] stored
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      stored <= '0;
    end else if (store) begin
      stored <= count;
      count  <= COARSE_W'(hit);
    end else begin
      count  <= count + COARSE_W'(hit);
    end
  end

endmodule
