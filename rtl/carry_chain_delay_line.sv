// carry_chain_delay_line: behavioural model of the tapped delay line.
//
// This is a simulation model, not synthesizable logic. On the FPGA the line is
// a column of CARRY4 carry blocks (four carry cells per slice) in which the
// Hit signal enters the first carry-in and ripples upwards; tap i is the
// carry-out of cell i. The model reproduces that behaviour with one transport
// delay per cell: taps[0] follows hit after TAP_DELAY_PS, taps[i] follows
// taps[i-1] after TAP_DELAY_PS. At 17.9 ps per cell, 280 cells span one 5 ns
// clock period, so a sample of the taps at a clock edge is a thermometer code
// whose run of ones (after a rising Hit) or zeros (after a falling Hit)
// starting at tap 0 gives the time from the edge to the clock edge.
//
// The uniform per-cell delay is this model's simplification: real cells vary
// (the measured differential non-linearity reaches several LSB). The cell
// delay follows the measured 17.9 ps figure.
//
// Interface: hit (asynchronous input event), taps[TAPS-1:0] (unregistered
// carry outputs, to be sampled by the system clock).
`timescale 1ps/100fs
module carry_chain_delay_line #(
  parameter int      TAPS         = tdc_pkg::TAPS,
  parameter realtime TAP_DELAY_PS = 17.9
) (
  input  logic            hit,
  output logic [TAPS-1:0] taps
);

  assign #(TAP_DELAY_PS) taps[0] = hit;

  for (genvar i = 1; i < TAPS; i++) begin : g_cell
    assign #(TAP_DELAY_PS) taps[i] = taps[i-1];
  end

endmodule
