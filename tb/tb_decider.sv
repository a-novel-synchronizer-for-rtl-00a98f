// tb_decider: random Hit pulses with edges placed uniformly, or within 100 ps
// of a Clk0, Clk1 or Clk2 edge (Clk1/Clk2 delayed by 1250/2500 ps, period
// 5000 ps, cell delay 17.9 ps). For each pulse an independent reference
// computes the true Clk0 count (edges of Clk0 while Hit is high), the fine
// values, and the true counts of the Clk1 and Clk2 counters. A counter whose
// clock has an edge within 100 ps of an edge of Hit is given a wrong count
// (+1 or -1), as metastability may make it. The decider must still return
// the true Clk0 count, and each of its three sources must be used.
`timescale 1ps/100fs
module tb_decider;
  import tdc_pkg::*;
  localparam real T = 5000.0, TAU = 17.9, PH1 = 1250.0, PH2 = 2500.0, WIN = 100.0;

  logic [COARSE_W-1:0] c0, c1, c2, coarse;
  logic [FINE_W-1:0] fs, fe;
  sync_src_e src;
  int checks = 0, failures = 0, n_src[3] = '{0, 0, 0}, n_err0 = 0;

  decider dut (.c0, .c1, .c2, .fine_start(fs), .fine_stop(fe), .coarse, .src);

  // index of the first edge of a clock with phase ph at or after time t
  function automatic longint first_edge(real t, real ph);
    return longint'($ceil((t - ph) / T));
  endfunction
  function automatic int fine_of(real t);
    return int'($floor((real'(first_edge(t, 0.0)) * T - t) / TAU));
  endfunction
  function automatic bit near(real t, real ph);
    real r = t - ph - T * $floor((t - ph) / T);   // position within the period
    return (r < WIN) || (r > T - WIN);
  endfunction
  function automatic int bump(bit is_near);
    return is_near ? (($urandom % 2) ? 1 : -1) : 0;
  endfunction
  function automatic real place(longint k, int kind);
    real off = 1.5 + real'($urandom % 97);
    real sgn = ($urandom % 2) ? 1.0 : -1.0;
    case (kind)
      0: return real'(k) * T + real'($urandom % 4999) + 0.5;
      1: return real'(k) * T + sgn * off;
      2: return real'(k) * T + PH1 + sgn * off;
      default: return real'(k) * T + PH2 + sgn * off;
    endcase
  endfunction

  initial begin
    #1ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      longint ks, ke, true0, t1, t2;
      real tr, tf;
      ks = 10 + longint'($urandom % 20000);
      ke = ks + 2 + longint'($urandom % 3000);
      tr = place(ks, $urandom % 4);
      tf = place(ke, $urandom % 4);
      true0 = first_edge(tf, 0.0) - first_edge(tr, 0.0);
      t1    = first_edge(tf, PH1) - first_edge(tr, PH1);
      t2    = first_edge(tf, PH2) - first_edge(tr, PH2);
      fs = FINE_W'(fine_of(tr));
      fe = FINE_W'(fine_of(tf));
      c0 = COARSE_W'(true0 + bump(near(tr, 0.0) || near(tf, 0.0)));
      c1 = COARSE_W'(t1 + bump(near(tr, PH1) || near(tf, PH1)));
      c2 = COARSE_W'(t2 + bump(near(tr, PH2) || near(tf, PH2)));
      if (c0 != COARSE_W'(true0)) n_err0++;
      #1ps;
      checks++;
      n_src[int'(src)]++;
      if (coarse !== COARSE_W'(true0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: tr=%0.1f tf=%0.1f fs=%0d fe=%0d c0=%0d c1=%0d c2=%0d -> %0d, true %0d",
                   tr, tf, fs, fe, c0, c1, c2, coarse, true0);
      end
    end
    $display("sources: clk0=%0d clk1=%0d clk2=%0d, wrong primary counts=%0d",
             n_src[0], n_src[1], n_src[2], n_err0);
    checks++;
    if (n_src[0] == 0 || n_src[1] == 0 || n_src[2] == 0 || n_err0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
