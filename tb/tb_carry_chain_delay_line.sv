// tb_carry_chain_delay_line: checks that an edge on hit walks through the
// taps at one cell delay per tap. After a rising hit at t0, at time t0 + d the
// line must hold floor(d / 17.9 ps) ones from tap 0 and zeros above; after a
// falling edge, the same run of zeros. Sample instants are chosen half a cell
// between arrivals so the expected count is unambiguous.
`timescale 1ps/100fs
module tb_carry_chain_delay_line;
  localparam int      TAPS = 280;
  localparam realtime TAU  = 17.9;

  logic            hit;
  logic [TAPS-1:0] taps;
  int checks = 0, failures = 0;

  carry_chain_delay_line dut (.hit, .taps);

  function automatic logic [TAPS-1:0] run_code(input int n);
    logic [TAPS-1:0] c = '0;
    for (int i = 0; i < n && i < TAPS; i++) c[i] = 1'b1;
    return c;
  endfunction

  task automatic check_at(input int n, input bit ones);
    logic [TAPS-1:0] exp = ones ? run_code(n) : ~run_code(n);
    checks++;
    if (taps !== exp) begin
      failures++;
      $display("FAIL: after %0d cells expected run %0d of %0b", n, n, ones);
    end
  endtask

  initial begin
    #20000ps;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    realtime t0;
    int ns [6] = '{0, 1, 7, 100, 279, 280};
    hit = 1'b0;
    #6000ps;                     // line settles to all zeros
    checks++;
    if (taps !== '0) failures++;
    // rising edge
    hit = 1'b1;
    t0 = $realtime;
    foreach (ns[k]) begin
      #((t0 + ns[k] * TAU + TAU / 2) - $realtime);
      check_at(ns[k], 1'b1);
    end
    #1000ps;
    checks++;
    if (taps !== '1) failures++;
    // falling edge
    hit = 1'b0;
    t0 = $realtime;
    foreach (ns[k]) begin
      #((t0 + ns[k] * TAU + TAU / 2) - $realtime);
      check_at(ns[k], 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
