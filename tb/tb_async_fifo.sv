// tb_async_fifo: writes at 200 MHz and reads at 100 MHz with random enables
// and compares every word read with a reference queue. A second phase stops
// reading until the FIFO reports full, writes more, and checks that the extra
// words were dropped, that overflow is set, and that the FIFO then drains in
// order to empty.
`timescale 1ps/100fs
module tb_async_fifo;
  localparam int W = 32, D = 16;
  logic wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, wr_full, overflow, rd_empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_read = 0, n_full = 0;
  logic pending = 1'b0;

  async_fifo dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data, .wr_full, .overflow,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data, .rd_empty);

  always #2500ps wclk = ~wclk;
  always #5000ps rclk = ~rclk;

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // reference of accepted writes
  always @(posedge wclk) if (wrst_n && wr_en && !wr_full) q.push_back(wr_data);
  always @(posedge wclk) if (wrst_n && wr_full) n_full++;

  // read side: compare data one cycle after an accepted read
  always @(posedge rclk) begin
    if (pending) begin
      checks++;
      n_read++;
      if (q.size() == 0 || rd_data !== q[0]) begin
        failures++;
        $display("FAIL: read %h expected %h", rd_data, q.size() ? q[0] : '0);
      end
      if (q.size()) void'(q.pop_front());
    end
    pending <= rrst_n && rd_en && !rd_empty;
  end

  initial begin
    #12000ps wrst_n = 1'b1; rrst_n = 1'b1;
    // phase 1: random traffic
    fork
      for (int i = 0; i < 2000; i++) begin
        @(posedge wclk); #100ps;
        wr_en = (($urandom % 3) == 0) && !wr_full;
        wr_data = $urandom;
      end
      for (int i = 0; i < 1000; i++) begin
        @(posedge rclk); #100ps;
        rd_en = ($urandom % 2) == 0;
      end
    join
    @(posedge wclk); #100ps wr_en = 1'b0;
    @(posedge rclk); #100ps rd_en = 1'b1;
    while (!rd_empty || q.size() != 0) @(posedge rclk);
    #100ps rd_en = 1'b0;
    checks++;
    if (overflow) begin failures++; $display("FAIL: overflow without full"); end
    // phase 2: overfill
    for (int i = 0; i < D + 8; i++) begin
      @(posedge wclk); #100ps;
      wr_en = 1'b1;
      wr_data = 32'hA000_0000 + i;
    end
    @(posedge wclk); #100ps wr_en = 1'b0;
    checks++;
    if (!overflow || q.size() != D || n_full == 0) begin
      failures++;
      $display("FAIL: overflow=%b stored=%0d", overflow, q.size());
    end
    @(posedge rclk); #100ps rd_en = 1'b1;
    while (!rd_empty || q.size() != 0) @(posedge rclk);
    repeat (4) @(posedge rclk);
    checks++;
    if (!rd_empty) failures++;
    $display("reads=%0d full cycles=%0d", n_read, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
