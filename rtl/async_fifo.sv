// async_fifo: dual-clock FIFO carrying measurements to the processor clock.
//
// A memory of DEPTH words is written in the TDC clock domain and read in the
// bus clock domain. Each side keeps a binary pointer one bit wider than the
// address and passes its Gray-coded copy to the other side through two
// flip-flops, so only one bit changes per step and a pointer seen mid-change
// is either the old or the new value. Full is declared when the write
// pointer's Gray code equals the synchronised read pointer with its two top
// bits inverted; empty when the read pointer equals the synchronised write
// pointer. Both flags are conservative (they may clear late, never early).
// A write while full is dropped and sets the sticky overflow flag, which
// only the write-side reset clears.
//
// That the measurements are stored in an asynchronous FIFO read over the
// processor bus follows the document; depth, Gray-pointer structure,
// overflow handling and the one-cycle read latency are this design's.
//
// Interface: write side wr_clk, wr_rst_n, wr_en, wr_data, wr_full, overflow;
// read side rd_clk, rd_rst_n, rd_en, rd_data (valid the cycle after a read
// of a non-empty FIFO), rd_empty. Resets are asynchronous, active low.
`timescale 1ps/100fs
module async_fifo #(
  parameter int WIDTH = tdc_pkg::MEAS_W,
  parameter int DEPTH = 16            // power of two
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  output logic             overflow,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(1);
  assign wr_full   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin_next;
        wgray <= bin2gray(wbin_next);
      end
      if (wr_en && wr_full) overflow <= 1'b1;
    end
  end

  // ---------------- read domain ----------------
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(1);
  assign rd_empty  = (rgray == wgray_r2);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      rd_data  <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !rd_empty) begin
        rd_data <= mem[rbin[AW-1:0]];
        rbin    <= rbin_next;
        rgray   <= bin2gray(rbin_next);
      end
    end
  end

endmodule
