// thermometer_decoder: bubble correction and thermometer-to-binary decode.
//
// The sampled delay line holds a run that starts at tap 0: ones after a
// rising Hit (start code), zeros after a falling Hit (stop code; INVERT = 1
// turns it into a run of ones). The run length is the number of carry cells
// the edge travelled before the sampling clock edge, i.e. the fine time in
// units of one cell delay.
//
// With the sample flip-flops placed in the slice of the cell they sample,
// skew can only swap bits inside a slice, so at most 2-bit bubbles occur.
// Bubbles are removed first: a bit is taken as one when it, or either of the
// next two bits, is one, which closes any gap of up to two zeros inside the
// run while leaving a clean code unchanged. The decoder then reports the
// index of the first zero of the corrected code (TAPS when the whole line is
// ones). The correction rule and the choice of the run's far end as the edge
// are this design's; bubble-correcting before decoding follows the document.
//
// Interface: purely combinational, code[TAPS-1:0] in, fine[FINE_W-1:0] out.
`timescale 1ps/100fs
module thermometer_decoder #(
  parameter int TAPS   = tdc_pkg::TAPS,
  parameter int FINE_W = tdc_pkg::FINE_W,
  parameter bit INVERT = 1'b0
) (
  input  logic [TAPS-1:0]   code,
  output logic [FINE_W-1:0] fine
);

  logic [TAPS-1:0] run;        // code with the run as ones
  logic [TAPS-1:0] corrected;  // after bubble removal

  always_comb begin
    run = INVERT ? ~code : code;
    for (int i = 0; i < TAPS; i++) begin
      corrected[i] = run[i];
      if (i + 1 < TAPS) corrected[i] = corrected[i] | run[i+1];
      if (i + 2 < TAPS) corrected[i] = corrected[i] | run[i+2];
    end
  end

  always_comb begin
    logic done;
    fine = FINE_W'(TAPS);
    done = 1'b0;
    for (int i = 0; i < TAPS; i++) begin
      if (!done && !corrected[i]) begin
        fine = FINE_W'(i);
        done = 1'b1;
      end
    end
  end

endmodule
