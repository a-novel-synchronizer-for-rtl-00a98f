// tb_merge: drives a fall flag with random values on the coarse and fine
// inputs (held in the following cycle, as the stop path makes them) and
// checks that new_measure is high exactly two cycles after the fall flag's
// cycle with {coarse, fine_start, fine_stop} in the 14/9/9-bit fields.
`timescale 1ps/100fs
module tb_merge;
  import tdc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, fall = 1'b0;
  logic [COARSE_W-1:0] coarse = '0;
  logic [FINE_W-1:0] fs = '0, fe = '0;
  sync_src_e src = SRC_CLK0, meas_src;
  tdc_meas_t meas;
  logic new_measure;
  int checks = 0, failures = 0, cyc = 0, fall_cyc = -10;
  logic [MEAS_W-1:0] exp_word;
  sync_src_e exp_src;

  merge dut (.clk, .rst_n, .fall, .coarse, .fine_start(fs), .fine_stop(fe), .src,
             .meas, .meas_src, .new_measure);

  always #2500ps clk = ~clk;

  initial begin
    #10ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    #1ps;
    checks++;
    if (new_measure !== (cyc == fall_cyc + 2)) begin
      failures++;
      $display("FAIL: new_measure=%b at cycle %0d, fall at %0d", new_measure, cyc, fall_cyc);
    end
    if (new_measure) begin
      checks++;
      if (meas !== exp_word || meas_src !== exp_src) begin
        failures++;
        $display("FAIL: word %h expected %h", meas, exp_word);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #100ps rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      @(posedge clk); #1000ps;
      fall = 1'b1;
      fall_cyc = cyc;
      @(posedge clk); #1000ps;
      fall = 1'b0;
      coarse = COARSE_W'($urandom);
      fs = FINE_W'($urandom % 281);
      fe = FINE_W'($urandom % 281);
      src = sync_src_e'($urandom % 3);
      exp_word = {coarse, fs, fe};
      exp_src = src;
      repeat (2 + $urandom % 3) @(posedge clk);
      #1000ps;
      coarse = '0; fs = '0; fe = '0;
    end
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
