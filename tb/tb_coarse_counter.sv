// tb_coarse_counter: applies Hit pulses of random length (1 to 60 cycles,
// gaps of 1 to 5 cycles, including one-cycle gaps) and a store pulse in the
// cycle after the first edge that sees Hit low, as the edge detector makes
// it, and checks that each stored value equals the number of clock edges at
// which Hit was high.
`timescale 1ps/100fs
module tb_coarse_counter;
  localparam int CW = 14;
  logic clk = 1'b0, rst_n = 1'b0, hit = 1'b0, store = 1'b0;
  logic [CW-1:0] count, stored;
  int checks = 0, failures = 0;
  int q[$];

  coarse_counter dut (.clk, .rst_n, .hit, .store, .count, .stored);

  always #2500ps clk = ~clk;

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // store = fall flag: high for the cycle after the first edge seeing hit low
  logic seen = 1'b0;
  always @(posedge clk) begin
    store <= seen & ~hit;
    seen  <= hit;
  end

  // check each stored value one edge after store
  always @(posedge clk) begin
    if (store) begin
      #1ps;
      checks++;
      if (q.size() == 0 || int'(stored) != q[0]) begin
        failures++;
        $display("FAIL: stored %0d expected %0d", stored, q.size() ? q[0] : -1);
      end
      if (q.size()) void'(q.pop_front());
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #100ps rst_n = 1'b1;
    for (int p = 0; p < 300; p++) begin
      int n, g;
      n = 1 + $urandom % 60;
      g = 1 + $urandom % 5;
      @(posedge clk); #1000ps;
      hit = 1'b1;
      q.push_back(n);
      repeat (n) @(posedge clk);
      #1000ps hit = 1'b0;
      repeat (g - 1) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
