// tb_dual_sample_thermometer: drives random tap patterns every cycle and
// random rise/fall flags, and checks that the start (stop) code equals the
// taps present at the clock edge before the edge at which the flag was high,
// and holds between flags.
`timescale 1ps/100fs
module tb_dual_sample_thermometer;
  localparam int TAPS = 280;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [TAPS-1:0] taps, start_code, stop_code;
  logic rise = 1'b0, fall = 1'b0;
  logic [TAPS-1:0] prev_taps, exp_start, exp_stop;
  int checks = 0, failures = 0;

  dual_sample_thermometer dut (.clk, .rst_n, .taps, .rise, .fall,
                                              .start_code, .stop_code);

  always #2500ps clk = ~clk;

  function automatic logic [TAPS-1:0] rnd();
    logic [TAPS-1:0] v;
    for (int i = 0; i < TAPS; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #5ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    taps = '0; prev_taps = '0; exp_start = '0; exp_stop = '0;
    repeat (2) @(posedge clk);
    #100ps rst_n = 1'b1;
    for (int c = 0; c < 500; c++) begin
      @(posedge clk);
      // registers update at this edge from values driven before it
      if (rise) exp_start = prev_taps;
      if (fall) exp_stop  = prev_taps;
      prev_taps = taps;
      #1000ps;
      checks++;
      if (start_code !== exp_start || stop_code !== exp_stop) begin
        failures++;
        $display("FAIL cycle %0d", c);
      end
      taps = rnd();
      rise = ($urandom % 4) == 0;
      fall = !rise && ($urandom % 4) == 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
