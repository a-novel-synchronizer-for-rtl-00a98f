// dual_sample_thermometer: two-stage sampling of the delay line taps.
//
// Stage one (the carry chain sample registers) captures all taps on every
// rising edge of the system clock; on the FPGA each of these flip-flops sits in
// the same slice as the carry cell it samples. Stage two holds the code of the
// cycle in which an edge of Hit was seen: the start register loads stage one
// while the one-cycle rise flag is high, the stop register loads it while the
// fall flag is high. Because the flags are raised in the cycle after the edge
// that first saw the new Hit level, stage two receives exactly the code sampled
// at that edge, and keeps it stable for the whole decode. The second stage also
// gives a metastable stage-one flip-flop a full cycle to settle.
//
// Interface: clk (Clk0), rst_n (asynchronous, active low, clears all codes),
// taps from the delay line, rise/fall flags from the edge detector;
// start_code/stop_code are valid from the cycle after the flag.
`timescale 1ps/100fs
module dual_sample_thermometer #(
  parameter int TAPS = tdc_pkg::TAPS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TAPS-1:0] taps,
  input  logic            rise,
  input  logic            fall,
  output logic [TAPS-1:0] start_code,
  output logic [TAPS-1:0] stop_code
);

  logic [TAPS-1:0] sample_q;   // carry chain sample registers

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_q   <= '0;
      start_code <= '0;
      stop_code  <= '0;
    end else begin
      sample_q <= taps;
      if (rise) start_code <= sample_q;
      if (fall) stop_code  <= sample_q;
    end
  end

endmodule
