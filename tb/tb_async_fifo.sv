// tb_async_fifo: writes and reads a 16-deep dual-clock FIFO from unrelated
// clocks (122.88 and 156.25 MHz) with random enables; checks order and content
// against a scoreboard, that full and empty stop writes and reads, that the
// occupancy counts stay within bounds, and that a word reaches the reader
// within three read clocks.
`timescale 1ps/1ps
module tb_async_fifo;
  localparam int D = 16;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [63:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(D):0] wr_count, rd_count;
  int checks = 0, failures = 0;

  async_fifo #(.WIDTH(64), .DEPTH(D)) dut (.*);
  always #4069 wr_clk = ~wr_clk;
  always #3200 rd_clk = ~rd_clk;

  logic [63:0] sb [$];
  int n_wr = 0, n_rd = 0, n_full = 0, n_empty_block = 0;
  int wr_bias = 1, rd_bias = 1;

  always @(posedge wr_clk) if (wr_rst_n) begin
    checks++;
    if (wr_count > D) begin failures++; $display("wr_count %0d", wr_count); end
    if (full) n_full++;
    if (wr_en && !full) begin sb.push_back(wr_data); n_wr++; end
  end

  always @(posedge rd_clk) if (rd_rst_n) begin
    checks++;
    if (rd_count > D) begin failures++; $display("rd_count %0d", rd_count); end
    if (rd_en && !empty) begin
      checks++;
      if (sb.size() == 0) begin failures++; $display("read from empty"); end
      else if (rd_data !== sb[0]) begin failures++; $display("got %h exp %h", rd_data, sb[0]); void'(sb.pop_front()); end
      else void'(sb.pop_front());
      n_rd++;
    end
    if (rd_en && empty) n_empty_block++;
  end

  always @(negedge wr_clk) begin
    wr_en   = ($urandom_range(0, 3) < wr_bias);
    wr_data = {$urandom, $urandom};
  end
  always @(negedge rd_clk) rd_en = ($urandom_range(0, 3) < rd_bias);

  initial begin
    repeat (200000) @(posedge rd_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge wr_clk);
    wr_rst_n = 1; rd_rst_n = 1;
    wr_bias = 3; rd_bias = 1;           // writer faster: FIFO fills
    repeat (3000) @(posedge wr_clk);
    wr_bias = 1; rd_bias = 4;           // reader faster: FIFO drains
    repeat (3000) @(posedge wr_clk);
    wr_bias = 2; rd_bias = 2;
    repeat (3000) @(posedge wr_clk);
    // latency: drain, then one write must be visible within 3 read clocks
    wr_bias = 0; rd_bias = 4;
    repeat (100) @(posedge wr_clk);
    rd_bias = 0;
    @(negedge wr_clk);
    wr_bias = 4;
    @(posedge wr_clk);
    #1 wr_bias = 0;
    begin
      int lat = 0;
      while (empty && lat < 10) begin @(posedge rd_clk); #1 lat++; end
      checks++;
      if (lat > 3) begin failures++; $display("latency %0d read clocks", lat); end
    end
    rd_bias = 4;
    repeat (50) @(posedge rd_clk);
    checks++;
    if (sb.size() != 0 || !empty) begin failures++; $display("%0d words left", sb.size()); end
    checks++;
    if (n_full == 0 || n_empty_block == 0) begin failures++; $display("full/empty never exercised"); end
    $display("written %0d read %0d, full cycles %0d", n_wr, n_rd, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
