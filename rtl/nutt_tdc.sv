// nutt_tdc: Nutt time-to-digital converter measuring the width of Hit.
//
// One tapped delay line of carry cells measures both edges of the Hit pulse.
// An edge detector on the system clock Clk0 raises a one-cycle rise flag
// after the first edge that sees Hit high and a fall flag after the first
// edge that sees it low; these flags load the start and stop thermometer
// registers from the delay line samples of that edge. A coarse counter counts
// Clk0 edges while Hit is high and stores the count on the fall flag. The
// synchronizer repeats the count on two phase-shifted clocks Clk1 and Clk2
// and picks the count that agrees with the fine values. The merge block
// packs {coarse, fine_start, fine_stop} into a 32-bit word, pulses
// new_measure, and the word is written to a dual-clock FIFO for the
// processor bus.
//
// The pulse width is
//   width = coarse * T + (fine_start - fine_stop) * cell delay,
// with T = 5 ns and a cell delay of about 17.9 ps.
//
// Timing: new_measure rises two Clk0 cycles after the first Clk0 edge that
// sees Hit low; Hit must stay high and low at least one delay line length
// (280 cells, slightly over one period) so that each code holds one clean run.
// The three clocks come from one PLL outside this module (Clk1 and Clk2 delayed
// by 1.25 ns and 2.5 ns in this design); rst_n resets the Clk0/Clk1/Clk2
// logic and the FIFO write side, rd_rst_n the FIFO read side.
//
// The delay line instance is a behavioural model; on the device it is a
// placed chain of carry primitives kept from optimisation.
`timescale 1ps/100fs
module nutt_tdc
  import tdc_pkg::*;
#(
  parameter int FIFO_DEPTH = 16
) (
  input  logic              clk0,
  input  logic              clk1,
  input  logic              clk2,
  input  logic              rst_n,
  input  logic              hit,
  output tdc_meas_t         tdc_measure,
  output logic              new_measure,
  output sync_src_e         sync_src,
  output logic              fifo_overflow,
  input  logic              rd_clk,
  input  logic              rd_rst_n,
  input  logic              rd_en,
  output logic [MEAS_W-1:0] rd_data,
  output logic              rd_empty
);

  logic [TAPS-1:0]     taps, start_code, stop_code;
  logic                rise, fall, hit_sync;
  logic [FINE_W-1:0]   fine_start, fine_stop;
  logic [COARSE_W-1:0] c0_run, c0, coarse;
  sync_src_e           src;
  logic                fifo_full;

  carry_chain_delay_line u_tdl (.hit, .taps);

  edge_detector u_edge (.clk(clk0), .rst_n, .hit, .rise, .fall, .hit_sync);

  dual_sample_thermometer u_sample (
    .clk(clk0), .rst_n, .taps, .rise, .fall, .start_code, .stop_code);

  thermometer_decoder #(.INVERT(1'b0)) u_dec_start (.code(start_code), .fine(fine_start));
  thermometer_decoder #(.INVERT(1'b1)) u_dec_stop  (.code(stop_code),  .fine(fine_stop));

  coarse_counter u_coarse (
    .clk(clk0), .rst_n, .hit, .store(fall), .count(c0_run), .stored(c0));

  synchronizer u_sync (
    .clk1, .clk2, .rst_n, .hit, .c0, .fine_start, .fine_stop, .coarse, .src);

  merge u_merge (
    .clk(clk0), .rst_n, .fall, .coarse, .fine_start, .fine_stop, .src,
    .meas(tdc_measure), .meas_src(sync_src), .new_measure);

  async_fifo #(.WIDTH(MEAS_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk(clk0), .wr_rst_n(rst_n), .wr_en(new_measure), .wr_data(tdc_measure),
    .wr_full(fifo_full), .overflow(fifo_overflow),
    .rd_clk, .rd_rst_n, .rd_en, .rd_data, .rd_empty);

endmodule
