// async_fifo: dual-clock FIFO for the clock-domain crossings of the datapath.
//
// Bridges the 122.88 MHz converter domain and the 156.25 MHz domain of the
// framer, deframer and Ethernet subsystem, in both directions. The document
// calls for an asynchronous FIFO at this point; its construction here is the
// usual one: binary read and write pointers one bit wider than the address,
// exchanged between the domains in Gray code through two-flop synchronisers.
// full and empty are exact in their own domain and conservative (late to
// clear) across it.
//
// The read side is first-word-fall-through: rd_data shows the oldest word
// whenever empty is low, and rd_en pops it. wr_count and rd_count give the
// occupancy as seen from each side; the framer uses rd_count to start a
// packet only when a whole payload is buffered. A write while full and a read
// while empty are ignored. DEPTH must be a power of two.
//
// Timing: a written word becomes visible to the reader two to three rd_clk
// edges after the write.
`timescale 1ps/1ps
module async_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                     wr_clk,
  input  logic                     wr_rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   wr_count,

  input  logic                     rd_clk,
  input  logic                     rd_rst_n,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   rd_count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_w1, rd_gray_w2;   // read pointer seen by the writer
  logic [AW:0] wr_gray_r1, wr_gray_r2;   // write pointer seen by the reader

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int k = int'(AW) - 1; k >= 0; k--) b[k] = b[k+1] ^ g[k];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0] rd_bin_w;
  assign rd_bin_w = gray2bin(rd_gray_w2);
  assign wr_count = wr_bin - rd_bin_w;
  assign full     = (wr_count == (AW+1)'(DEPTH));

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_w1 <= '0;
      rd_gray_w2 <= '0;
    end else begin
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
      if (wr_en && !full) begin
        wr_bin  <= wr_bin + 1'b1;
        wr_gray <= bin2gray(wr_bin + 1'b1);
      end
    end
  end

  // ---------------- read domain ----------------
  logic [AW:0] wr_bin_r;
  assign wr_bin_r = gray2bin(wr_gray_r2);
  assign rd_count = wr_bin_r - rd_bin;
  assign empty    = (rd_count == '0);
  assign rd_data  = mem[rd_bin[AW-1:0]];

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
    end else begin
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
      if (rd_en && !empty) begin
        rd_bin  <= rd_bin + 1'b1;
        rd_gray <= bin2gray(rd_bin + 1'b1);
      end
    end
  end

endmodule
