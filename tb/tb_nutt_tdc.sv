// tb_nutt_tdc: end-to-end test of the converter at its default size (280-cell
// delay line, 17.9 ps cells, 14-bit coarse count, 16-word FIFO).
//
// Clk0 runs at 200 MHz, Clk1 and Clk2 are delayed by 1250 ps and 2500 ps, the
// read clock runs at 100 MHz. Hit pulses (2 to 40 periods wide, gaps from 1.2
// periods up) have edges placed uniformly, or within 100 ps of a Clk0, Clk1 or
// Clk2 edge so that every source of the synchronizer is used. For each pulse
// a reference computes the true Clk0 count and fine values from the edge
// times; every new_measure word is checked against it, the pulse width
// rebuilt from the word is checked to within two cells, and new_measure
// must come exactly two Clk0 edges after the first Clk0 edge that sees Hit
// low. The read side drains the FIFO and compares every word. In the middle
// the reader pauses until the FIFO overflows.
//
// A two-state simulator has no metastability, so the primary counter never
// errs by itself. To stand in for it, whenever an edge of a pulse is within
// 100 ps of a Clk0 edge the primary stored count is forced one off (up or
// down) from just after it is stored until the result is merged; the word
// must still carry the true count. Mechanisms counted: each synchronizer
// source, forced wrong counts, short (about one period) gaps, FIFO overflow.
`timescale 1ps/100fs
module tb_nutt_tdc;
  import tdc_pkg::*;
  localparam real T = 5000.0, TAU = 17.9, PH1 = 1250.0, PH2 = 2500.0, WIN = 100.0;
  localparam int  NPULSE = 400;

  logic clk0 = 1'b0, clk1 = 1'b0, clk2 = 1'b0, rd_clk = 1'b0;
  logic rst_n = 1'b0, rd_rst_n = 1'b0, hit = 1'b0, rd_en = 1'b0;
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

  int checks = 0, failures = 0;
  int n_src[3] = '{0, 0, 0};
  int n_meas = 0, n_read = 0, n_short_gap = 0, n_overflow_seen = 0;

  // expected results, in pulse order
  typedef struct {
    longint coarse;
    real    fs, fe;      // exact fine values in cells (before truncation)
    real    width;
    longint eoc_edge;    // Clk0 edge index at which new_measure must be seen
  } exp_t;
  exp_t exp_q[$];
  logic [MEAS_W-1:0] fifo_q[$];
  longint edge_idx = -1;

  // Clk0 rising edges are at 2500 + n*T
  function automatic longint first_edge(real t, real ph);
    return longint'($ceil((t - ph - 2500.0) / T));
  endfunction
  function automatic real fine_exact(real t);
    return (real'(first_edge(t, 0.0)) * T + 2500.0 - t) / TAU;
  endfunction
  function automatic bit fine_ok(int got, real x);
    // floor(x); when an arrival ties with the clock edge either side is fine
    int f = int'($floor(x));
    return got == f || (got == f - 1 && (x - real'(f)) < 1e-3);
  endfunction
  function automatic real place(longint k, int kind);
    real off = 1.5 + real'($urandom % 97);
    real sgn = ($urandom % 2) ? 1.0 : -1.0;
    real e = real'(k) * T + 2500.0;
    case (kind)
      0, 1, 2: return e + real'($urandom % 4999) + 0.5;
      3:       return e + sgn * off;
      4:       return e + PH1 + sgn * off;
      default: return e + PH2 + sgn * off;
    endcase
  endfunction

  always @(posedge clk0) edge_idx++;

  // Metastability stand-in: when an edge of the pulse lies within WIN of a
  // Clk0 edge, the primary counter's stored value is forced one count off
  // from just after it is stored until the result has been merged.
  int n_injected = 0;
  task automatic inject(longint true_c0, longint eoc_edge);
    logic [COARSE_W-1:0] bad;
    bad = COARSE_W'(true_c0 + (($urandom % 2) ? 1 : -1));
    // from 100 ps after the store edge E(m+1) to 100 ps after the merge edge E(m+2)
    #(real'(eoc_edge - 1) * T + 2500.0 + 100.0 - $realtime);
    force dut.c0 = bad;
    n_injected++;
    #(T);
    release dut.c0;
  endtask
  function automatic bit near0(real t);
    real u = t - 2500.0;
    real r = u - T * $floor(u / T);
    return (r < WIN) || (r > T - WIN);
  endfunction

  // check every conversion
  always @(posedge clk0) begin
    #1ps;
    if (new_measure) begin
      exp_t e;
      real w;
      n_meas++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected measurement %h", tdc_measure);
      end else begin
        e = exp_q.pop_front();
        w = real'(tdc_measure.coarse) * T
          + (real'(tdc_measure.fine_start) - real'(tdc_measure.fine_stop)) * TAU;
        if (tdc_measure.coarse !== COARSE_W'(e.coarse)
            || !fine_ok(int'(tdc_measure.fine_start), e.fs)
            || !fine_ok(int'(tdc_measure.fine_stop), e.fe)
            || edge_idx != e.eoc_edge
            || (w - e.width) > 2.0 * TAU || (e.width - w) > 2.0 * TAU) begin
          failures++;
          $display("FAIL: got c=%0d fs=%0d fe=%0d at edge %0d; expected c=%0d fs=%0.2f fe=%0.2f at edge %0d",
                   tdc_measure.coarse, tdc_measure.fine_start, tdc_measure.fine_stop, edge_idx,
                   e.coarse, e.fs, e.fe, e.eoc_edge);
        end
        n_src[int'(sync_src)]++;
      end
    end
  end

  // FIFO reference: every word offered while not full is stored
  always @(posedge clk0) begin
    if (rst_n && new_measure && !dut.u_fifo.wr_full) fifo_q.push_back(tdc_measure);
    if (rst_n && new_measure && dut.u_fifo.wr_full) n_overflow_seen++;
  end

  logic rd_pending = 1'b0;
  always @(posedge rd_clk) begin
    if (rd_pending) begin
      checks++;
      n_read++;
      if (fifo_q.size() == 0 || rd_data !== fifo_q[0]) begin
        failures++;
        $display("FAIL: FIFO read %h expected %h", rd_data, fifo_q.size() ? fifo_q[0] : '0);
      end
      if (fifo_q.size()) void'(fifo_q.pop_front());
    end
    rd_pending <= rd_rst_n && rd_en && !rd_empty;
  end

  initial begin
    #5ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint k, ks, ke;
    real tr, tf;
    exp_t e;
    #12000ps rst_n = 1'b1; rd_rst_n = 1'b1;
    rd_en = 1'b1;
    k = 4;
    for (int n = 0; n < NPULSE; n++) begin
      // reader pause in the middle forces FIFO overflow
      if (n == NPULSE / 2) rd_en = 1'b0;
      if (n == NPULSE / 2 + 24) rd_en = 1'b1;
      ks = k + 1;
      ke = ks + 2 + longint'($urandom % 38);
      tr = place(ks, $urandom % 6);
      tf = place(ke, $urandom % 6);
      e.coarse   = first_edge(tf, 0.0) - first_edge(tr, 0.0);
      e.fs       = fine_exact(tr);
      e.fe       = fine_exact(tf);
      e.width    = tf - tr;
      e.eoc_edge = first_edge(tf, 0.0) + 2;
      exp_q.push_back(e);
      #(tr - $realtime) hit = 1'b1;
      #(tf - $realtime) hit = 1'b0;
      if (near0(tr) || near0(tf)) begin
        automatic longint ic = e.coarse, ie = e.eoc_edge;
        fork inject(ic, ie); join_none
      end
      // next pulse: usually a few periods later, sometimes about one period
      if ($urandom % 5 == 0) begin
        real gap;
        gap = 6000.0 + real'($urandom % 400) + 0.3;
        n_short_gap++;
        #(gap) ;
        k = first_edge($realtime, 0.0) - 1;
        // place the next rise exactly here (uniform kind)
        tr = $realtime;
        ke = first_edge(tr, 0.0) + 2 + longint'($urandom % 38);
        tf = place(ke, $urandom % 6);
        e.coarse   = first_edge(tf, 0.0) - first_edge(tr, 0.0);
        e.fs       = fine_exact(tr);
        e.fe       = fine_exact(tf);
        e.width    = tf - tr;
        e.eoc_edge = first_edge(tf, 0.0) + 2;
        exp_q.push_back(e);
        hit = 1'b1;
        #(tf - $realtime) hit = 1'b0;
      end
      k = first_edge(tf, 0.0) + 1 + longint'($urandom % 4);
    end
    #100000ps;
    while (!rd_empty) @(posedge rd_clk);
    repeat (4) @(posedge rd_clk);
    $display("measurements=%0d reads=%0d sources clk0=%0d clk1=%0d clk2=%0d short gaps=%0d dropped=%0d forced wrong counts=%0d",
             n_meas, n_read, n_src[0], n_src[1], n_src[2], n_short_gap, n_overflow_seen, n_injected);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d conversions missing", exp_q.size()); end
    checks++;
    if (n_src[0] == 0 || n_src[1] == 0 || n_src[2] == 0) begin failures++; $display("FAIL: a synchronizer source never used"); end
    checks++;
    if (n_short_gap == 0 || n_overflow_seen == 0 || !fifo_overflow || n_injected == 0) begin failures++; $display("FAIL: short gap, overflow or forced count never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
