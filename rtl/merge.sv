// merge: packs one conversion into a 32-bit word and flags its completion.
//
// The fall flag marks the cycle in which the stop thermometer and the coarse
// stored values are loaded; one cycle later the decoded fine values and the
// decider's coarse count are stable, and this block registers them as
// {coarse, fine_start, fine_stop} (14 + 9 + 9 bits) and raises new_measure,
// the end-of-conversion flag, for one cycle. The latency is therefore two
// Clk0 cycles from the first edge that sees Hit low to new_measure. Merging
// the three values into one 32-bit word with an end-of-conversion flag
// follows the document; the field order and widths are this design's.
//
// Interface: clk (Clk0), rst_n (asynchronous, active low), fall, coarse,
// fine_start, fine_stop, src; registered meas, meas_src and new_measure.
`timescale 1ps/100fs
module merge
  import tdc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                fall,
  input  logic [COARSE_W-1:0] coarse,
  input  logic [FINE_W-1:0]   fine_start,
  input  logic [FINE_W-1:0]   fine_stop,
  input  sync_src_e           src,
  output tdc_meas_t           meas,
  output sync_src_e           meas_src,
  output logic                new_measure
);

  logic pending;   // stop code and stored counts loaded this cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending     <= 1'b0;
      new_measure <= 1'b0;
      meas        <= '0;
      meas_src    <= SRC_CLK0;
    end else begin
      pending     <= fall;
      new_measure <= pending;
      if (pending) begin
        meas     <= '{coarse: coarse, fine_start: fine_start, fine_stop: fine_stop};
        meas_src <= src;
      end
    end
  end

endmodule
