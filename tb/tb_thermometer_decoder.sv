// tb_thermometer_decoder: builds thermometer codes with a run of length F
// from tap 0 (F = 0..280, every value), optionally with a bubble of one or two
// zeros inside the run, for a start decoder (run of ones) and a stop decoder
// (run of zeros), and checks that both report F.
`timescale 1ps/100fs
module tb_thermometer_decoder;
  localparam int TAPS = 280;
  localparam int FW   = 9;
  logic [TAPS-1:0] code_s, code_e;
  logic [FW-1:0]   fine_s, fine_e;
  int checks = 0, failures = 0, n_bubbles = 0;

  thermometer_decoder #(.INVERT(1'b0)) dut_s (.code(code_s), .fine(fine_s));
  thermometer_decoder #(.INVERT(1'b1)) dut_e (.code(code_e), .fine(fine_e));

  initial begin
    #1ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int f = 0; f <= TAPS; f++) begin
        logic [TAPS-1:0] run;
        run = '0;
        for (int i = 0; i < f; i++) run[i] = 1'b1;
        // bubble: one or two zeros strictly inside the run (rep 1..3)
        if (rep > 0 && f >= 4) begin
          int len, pos;
          len = (rep == 3) ? 2 : 1;
          pos = $urandom % (f - len - 1);  // last run bit stays 1
          for (int j = 0; j < len; j++) run[pos + j] = 1'b0;
          n_bubbles++;
        end
        code_s = run;
        code_e = ~run;
        #1ps;
        checks += 2;
        if (int'(fine_s) != f) begin
          failures++;
          $display("FAIL start: run %0d decoded %0d (rep %0d)", f, fine_s, rep);
        end
        if (int'(fine_e) != f) begin
          failures++;
          $display("FAIL stop: run %0d decoded %0d (rep %0d)", f, fine_e, rep);
        end
      end
    end
    checks++;
    if (n_bubbles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
