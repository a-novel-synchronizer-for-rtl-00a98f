// tb_edge_detector: drives an asynchronous hit with random high and low
// times (at least one clock period) and checks that rise and fall are each
// high for exactly the one cycle after the first clock edge that sees the new
// level, by comparing with a reference built from the level of hit at each
// edge.
`timescale 1ps/100fs
module tb_edge_detector;
  logic clk = 1'b0, rst_n = 1'b0, hit = 1'b0;
  logic rise, fall, hit_sync;
  int checks = 0, failures = 0, n_rise = 0, n_fall = 0;
  logic prev_seen = 1'b0, seen = 1'b0;

  edge_detector dut (.clk, .rst_n, .hit, .rise, .fall, .hit_sync);

  always #2500ps clk = ~clk;

  initial begin
    #2ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // Reference: level seen at each rising edge, and the one before.
  always @(posedge clk) begin
    if (rst_n) begin
      #1ps;
      checks++;
      if (rise !== (seen & ~prev_seen) || fall !== (~seen & prev_seen) || hit_sync !== seen) begin
        failures++;
        $display("FAIL at %t: rise=%b fall=%b exp %b %b", $realtime, rise, fall,
                 seen & ~prev_seen, ~seen & prev_seen);
      end
      n_rise += int'(rise);
      n_fall += int'(fall);
    end
  end
  always @(posedge clk) begin
    prev_seen <= rst_n ? seen : 1'b0;
    seen      <= rst_n ? hit  : 1'b0;
  end

  initial begin
    repeat (3) @(posedge clk);
    #100ps rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      #(5000 + ($urandom % 30000) * 1.0 + 0.3);
      hit = ~hit;
    end
    #20000ps;
    checks++;
    if (n_rise != 100 || n_fall != 100) begin
      failures++;
      $display("FAIL: %0d rises, %0d falls, expected 100 each", n_rise, n_fall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
