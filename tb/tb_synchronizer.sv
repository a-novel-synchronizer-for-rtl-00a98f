// tb_synchronizer: runs the two arbiters on real phase-shifted clocks (Clk0
// period 5000 ps, Clk1 and Clk2 delayed by 1250 and 2500 ps) with Hit pulses
// whose edges are placed uniformly or within 100 ps of a Clk0, Clk1 or Clk2
// edge. The primary count c0 and the fine values come from a reference
// model; when an edge of Hit is within 100 ps of a Clk0 edge, c0 is given a
// wrong value (+1 or -1), as a metastable primary counter may produce. Just
// before the second Clk0 edge after the first Clk0 edge that sees Hit low
// (the cycle in which the converter merges the result), coarse must equal
// the true Clk0 count.
`timescale 1ps/100fs
module tb_synchronizer;
  import tdc_pkg::*;
  localparam real T = 5000.0, TAU = 17.9, PH1 = 1250.0, PH2 = 2500.0, WIN = 100.0;

  logic clk0 = 1'b0, clk1 = 1'b0, clk2 = 1'b0, rst_n = 1'b0, hit = 1'b0;
  logic [COARSE_W-1:0] c0 = '0, coarse;
  logic [FINE_W-1:0] fs = '0, fe = '0;
  sync_src_e src;
  int checks = 0, failures = 0, n_src[3] = '{0, 0, 0}, n_err0 = 0;

  synchronizer dut (.clk1, .clk2, .rst_n, .hit, .c0, .fine_start(fs), .fine_stop(fe),
                    .coarse, .src);

  initial forever begin #2500ps clk0 = ~clk0; end
  initial begin #1250ps; forever begin #2500ps clk1 = ~clk1; end end
  initial begin #2500ps; forever begin #2500ps clk2 = ~clk2; end end

  function automatic longint first_edge(real t, real ph);
    return longint'($ceil((t - ph - 2500.0) / T));   // rising edges at 2500 + ph + nT
  endfunction
  function automatic int fine_of(real t);
    return int'($floor((real'(first_edge(t, 0.0)) * T + 2500.0 - t) / TAU));
  endfunction
  function automatic bit near(real t, real ph);
    real u = t - ph - 2500.0;
    real r = u - T * $floor(u / T);
    return (r < WIN) || (r > T - WIN);
  endfunction
  function automatic real place(longint k, int kind);
    real off = 1.5 + real'($urandom % 97);
    real sgn = ($urandom % 2) ? 1.0 : -1.0;
    real e = real'(k) * T + 2500.0;
    case (kind)
      0: return e + real'($urandom % 4999) + 0.5;
      1: return e + sgn * off;
      2: return e + PH1 + sgn * off;
      default: return e + PH2 + sgn * off;
    endcase
  endfunction

  initial begin
    #200ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint k;
    #7000ps rst_n = 1'b1;
    k = 4;
    for (int n = 0; n < 1500; n++) begin
      longint ks, ke, true0;
      real tr, tf, tread;
      int ec;
      ks = k + 1;
      ke = ks + 2 + longint'($urandom % 30);
      tr = place(ks, $urandom % 4);
      tf = place(ke, $urandom % 4);
      true0 = first_edge(tf, 0.0) - first_edge(tr, 0.0);
      #(tr - $realtime) hit = 1'b1;
      #(tf - $realtime) hit = 1'b0;
      ec = (near(tr, 0.0) || near(tf, 0.0)) ? (($urandom % 2) ? 1 : -1) : 0;
      if (ec != 0) n_err0++;
      c0 = COARSE_W'(true0 + ec);
      fs = FINE_W'(fine_of(tr));
      fe = FINE_W'(fine_of(tf));
      tread = real'(first_edge(tf, 0.0) + 2) * T + 2500.0 - 10.0;
      #(tread - $realtime);
      checks++;
      n_src[int'(src)]++;
      if (coarse !== COARSE_W'(true0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: tr=%0.1f tf=%0.1f fs=%0d fe=%0d c0=%0d -> %0d (src %0d), true %0d",
                   tr, tf, fs, fe, c0, coarse, src, true0);
      end
      k = first_edge(tf, 0.0) + 2 + longint'($urandom % 3);
    end
    $display("sources: clk0=%0d clk1=%0d clk2=%0d, wrong primary counts=%0d",
             n_src[0], n_src[1], n_src[2], n_err0);
    checks++;
    if (n_src[0] == 0 || n_src[1] == 0 || n_src[2] == 0 || n_err0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
