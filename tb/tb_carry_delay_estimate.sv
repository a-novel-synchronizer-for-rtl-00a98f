// tb_carry_delay_estimate: the cell-delay measurement used to size the line.
//
// A free-running square wave drives the delay line, and the first sampling
// stage captures the taps on a slower, unrelated clock (about 50 MHz). The
// half period of the square wave starts above the line length and shrinks in
// 100 ps steps. As long as a half period is longer than the line, no sample
// can hold a whole high phase. Once one fits, samples show a run of ones with
// zeros on both sides, and half period / ones in the run estimates the cell
// delay. The estimate must be 17.9 ps to within 0.1 ps, and the first
// complete run must appear only once the half period is shorter than
// 280 x 17.9 ps = 5012 ps.
`timescale 1ps/100fs
module tb_carry_delay_estimate;
  import tdc_pkg::*;
  logic sclk = 1'b0, rst_n = 1'b0, wave = 1'b0, run_wave = 1'b1;
  logic [TAPS-1:0] taps, start_code, stop_code;
  real half = 5600.0;
  int checks = 0, failures = 0;

  carry_chain_delay_line u_line (.hit(wave), .taps);
  dual_sample_thermometer u_sample (.clk(sclk), .rst_n, .taps, .rise(1'b1), .fall(1'b0),
                                    .start_code, .stop_code);

  always #10001.7ps sclk = ~sclk;

  initial begin
    #10ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #3.3ps;
    while (run_wave) begin
      #(half) wave = ~wave;
    end
  end

  // length of a run of ones with a zero before and after it, or -1
  function automatic int complete_run(logic [TAPS-1:0] c);
    int i = 0, s;
    while (i < TAPS && c[i]) i++;          // skip a run touching tap 0
    while (i < TAPS && !c[i]) i++;
    if (i >= TAPS) return -1;
    s = i;
    while (i < TAPS && c[i]) i++;
    if (i >= TAPS) return -1;              // reaches the end of the line
    return i - s;
  endfunction

  initial begin
    real est, found_half;
    int n, runs;
    found_half = 0.0;
    est = 0.0;
    repeat (2) @(posedge sclk);
    rst_n = 1'b1;
    while (half > 4000.0 && found_half == 0.0) begin
      runs = 0;
      est  = 0.0;
      repeat (40) begin
        @(posedge sclk); #1ps;
        n = complete_run(start_code);
        if (n > 0) begin
          runs++;
          est += half / real'(n);
        end
      end
      if (runs > 0) begin
        found_half = half;
        est = est / real'(runs);
      end else begin
        half -= 100.0;
        repeat (3) @(posedge sclk);      // let the new half period reach the samples
      end
    end
    run_wave = 1'b0;
    $display("first complete half period %0.1f ps, estimated cell delay %0.3f ps", found_half, est);
    checks++;
    if (found_half == 0.0 || found_half > 280.0 * 17.9) begin
      failures++;
      $display("FAIL: complete run at half period %0.1f ps", found_half);
    end
    checks++;
    if (est < 17.8 || est > 18.0) begin
      failures++;
      $display("FAIL: estimate %0.3f ps", est);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
