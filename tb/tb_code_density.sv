// tb_code_density: code density test of the converter with a 50 % duty
// square wave at 700 kHz (10000 pulses, as in the code density measurement) and at 800
// and 900 kHz (the range of the synchronizer evaluation), Clk0 at 200 MHz.
//
// So that every delay cell is equally likely to hold the edge, each period of
// the square wave starts at a random phase with respect to Clk0 while the high
// time stays exactly half the nominal period; this stands in for a generator
// whose frequency is uncorrelated with the system clock. For every pulse the
// measured width, coarse * 5000 ps + (fine_start - fine_stop) * 17.9 ps, must
// be within two cells of the true half period, i.e. no coarse error of one
// clock period. From the histogram of fine_start values the cell width is
// estimated as W_i = N_i * T / N; the number of populated bins must match a
// full clock period (279 or 280) and the mean cell width must be 17.9 ps.
// DNL (cell width / mean - 1) and INL (running sum of DNL) are printed; with
// the uniform line model they only show the statistical spread.
`timescale 1ps/100fs
module tb_code_density;
  import tdc_pkg::*;
  localparam real T = 5000.0, TAU = 17.9;
  localparam int  NPF[3] = '{10000, 1500, 1500};   // pulses per frequency

  logic clk0 = 1'b0, clk1 = 1'b0, clk2 = 1'b0, rd_clk = 1'b0;
  logic rst_n = 1'b0, rd_rst_n = 1'b0, hit = 1'b0, rd_en = 1'b1;
  tdc_meas_t tdc_measure;
  logic new_measure, fifo_overflow, rd_empty;
  sync_src_e sync_src;
  logic [MEAS_W-1:0] rd_data;

  nutt_tdc dut (.clk0, .clk1, .clk2, .rst_n, .hit, .tdc_measure, .new_measure,
                .sync_src, .fifo_overflow, .rd_clk, .rd_rst_n, .rd_en, .rd_data, .rd_empty);

  initial forever begin #2500ps clk0 = ~clk0; end
  initial begin #1250ps; forever begin #2500ps clk1 = ~clk1; end end
  initial begin #2500ps; forever begin #2500ps clk2 = ~clk2; end end
  always #5000ps rd_clk = ~rd_clk;

  int checks = 0, failures = 0, n_meas = 0, n_src[3] = '{0, 0, 0};
  int hist[TAPS+1];
  real cur_width;

  always @(posedge clk0) begin
    #1ps;
    if (new_measure) begin
      real w;
      n_meas++;
      checks++;
      w = real'(tdc_measure.coarse) * T
        + (real'(tdc_measure.fine_start) - real'(tdc_measure.fine_stop)) * TAU;
      if ((w - cur_width) > 2.0 * TAU || (cur_width - w) > 2.0 * TAU) begin
        failures++;
        $display("FAIL: width %0.1f ps measured as %0.1f ps", cur_width, w);
      end
      hist[tdc_measure.fine_start]++;
      n_src[int'(sync_src)]++;
    end
  end

  initial begin
    #80ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real freqs[3] = '{700.0e3, 800.0e3, 900.0e3};
    foreach (hist[i]) hist[i] = 0;
    #12000ps rst_n = 1'b1; rd_rst_n = 1'b1;
    foreach (freqs[f]) begin
      real period, half, t0;
      period = 1.0e12 / freqs[f];
      half   = $floor(period / 2.0 * 10.0) / 10.0;       // 0.1 ps grid
      if (half - $floor(half) > 0.65 && half - $floor(half) < 0.75) half += 0.1;
      cur_width = half;
      for (int n = 0; n < NPF[f]; n++) begin
        // random phase against Clk0, fraction .3 so no edge ties with a clock edge
        t0 = $realtime + real'($urandom % 5000) + 0.3;
        #(t0 - $realtime) hit = 1'b1;
        #(half) hit = 1'b0;
        #(period - half - 5000.0);
      end
    end
    #100000ps;
    begin
      int nbins;
      real lsb, dnl_max, wi, dnl, inl, inl_max;
      nbins = 0;
      dnl_max = 0.0;
      inl = 0.0;
      inl_max = 0.0;
      for (int i = 0; i <= TAPS; i++) if (hist[i] != 0) nbins++;
      lsb = T / real'(nbins);
      for (int i = 0; i < nbins; i++) begin
        wi  = real'(hist[i]) * T / real'(n_meas);   // cell width W_i = N_i T / N
        dnl = wi / lsb - 1.0;
        inl += dnl;                                   // INL = running sum of DNL
        if (dnl > dnl_max) dnl_max = dnl;
        if (inl > inl_max) inl_max = inl;
        if (-inl > inl_max) inl_max = -inl;
      end
      $display("measurements=%0d populated bins=%0d estimated cell=%0.2f ps max DNL=%0.2f LSB max |INL|=%0.2f LSB sources clk0=%0d clk1=%0d clk2=%0d",
               n_meas, nbins, lsb, dnl_max, inl_max, n_src[0], n_src[1], n_src[2]);
      checks++;
      if (n_meas != NPF[0] + NPF[1] + NPF[2]) begin failures++; $display("FAIL: %0d measurements", n_meas); end
      checks++;
      if (nbins < 279 || nbins > 280) begin failures++; $display("FAIL: %0d bins", nbins); end
      checks++;
      if (lsb < 17.8 || lsb > 18.0) failures++;
      checks++;
      if (n_src[1] == 0) begin failures++; $display("FAIL: synchronizer never engaged"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
